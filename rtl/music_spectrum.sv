// MUSIC pseudo-spectrum generation: PMUSIC_k = 10*log10(1/projection_k).
//
// With the projection written as D_k / E (see music_noise_subspace), the
// spectrum in decibels is 10*log10(E) - 10*log10(D_k). Both logarithms are
// taken in base 2 by fx_log2 and the difference is scaled by
// 10/log2(10) = 3.0103 (a 16-bit constant with 14 fraction bits). The output
// is signed with DB_FRAC = 8 fraction bits, DBW = 32 bits wide. Fixed-point
// logs in place of a floating-point log10 are this design's choice.
//
// Interface and timing: purely combinational; valid/ready pass straight
// through so the stage adds no latency.
module music_spectrum
  import rsp_pkg::*;
#(
  parameter int VW = 128
) (
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [VW-1:0]         in_d,
  input  logic [VW-1:0]         in_e,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic signed [DBW-1:0] out_db
);

  localparam int LF   = 12;
  localparam int LW   = $clog2(VW) + LF;
  localparam int KDB  = 49322;            // round(3.0102999566 * 2**14)

  logic [LW-1:0]          le, ld;
  logic signed [LW+1:0]   diff;
  logic signed [LW+19:0]  prod;

  fx_log2 #(.VW(VW), .LF(LF)) u_le (.v(in_e), .log2v(le));
  fx_log2 #(.VW(VW), .LF(LF)) u_ld (.v(in_d), .log2v(ld));

  always_comb begin
    diff   = (LW+2)'(le) - (LW+2)'(ld);
    prod   = (LW+20)'(diff) * (LW+20)'(KDB);
    out_db = DBW'(prod >>> (14 + LF - DB_FRAC));
  end

  assign out_valid = in_valid;
  assign in_ready  = out_ready;

endmodule
