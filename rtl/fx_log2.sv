// Fixed-point base-2 logarithm of an unsigned integer.
//
// log2(v) = p + log2(1 + m), where p is the position of the leading one and m
// the next MB bits below it read as a fraction. log2(1 + m) comes from a
// 2**MB-entry table computed at elaboration; the result has LF fraction bits.
// Truncating the mantissa to MB = 8 bits keeps the error below 0.006 (0.017 dB
// once scaled to decibels). Zero input returns zero. Purely combinational.
module fx_log2 #(
  parameter int VW = 128,   // input width
  parameter int MB = 8,     // mantissa bits used
  parameter int LF = 12     // fraction bits of the result
) (
  input  logic [VW-1:0]               v,
  output logic [$clog2(VW)+LF-1:0]    log2v
);

  localparam int PW = $clog2(VW);

  logic [LF-1:0] frac_rom [2**MB];
  for (genvar i = 0; i < 2**MB; i++) begin : g_rom
    localparam real L = $ln(1.0 + real'(i) / (2.0 ** MB)) / $ln(2.0);
    localparam int  Q = int'(L * (2.0 ** LF));
    assign frac_rom[i] = (Q >= 2**LF) ? LF'(2**LF - 1) : LF'(Q);
  end

  logic [PW-1:0]   pos;
  logic [MB-1:0]   mant;

  always_comb begin
    pos = '0;
    for (int i = 0; i < VW; i++) if (v[i]) pos = PW'(i);
    // the MB bits just below the leading one
    for (int b = 0; b < MB; b++)
      mant[MB-1-b] = (int'(pos) > b) ? v[int'(pos) - 1 - b] : 1'b0;
    log2v = {pos, frac_rom[mant]};
  end

endmodule
