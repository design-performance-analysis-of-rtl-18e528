// Correlation (diagonal matrix-vector product) of the matched filter.
//
// Of the full product of the steered echo matrix (bins x antennas) with the
// transmitted matrix only the diagonal is needed, and every antenna sends the
// same waveform, so each output bin is
//     z[m] = conj(X[m]) * (1/NANT) * sum_n R_n[m]
// where R_n[m] are the steered bins of the NANT antennas and X[m] the stored
// spectrum of the transmitted packet. All NANT additions happen in one clock
// (an adder tree), one bin per clock. Conjugating X in hardware and dividing
// the antenna sum by NANT (a shift) to stay in Q1.(DW-1) are this design's
// choices.
//
// Interface: `in_valid` with NANT bins and the X bin in; `out` and
// `out_valid` one clock later; no back-pressure.
module correlation
  import rsp_pkg::*;
#(
  parameter int NANT = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_bins [NANT],
  input  cplx_t xf,
  output logic  out_valid,
  output cplx_t out
);

  localparam int SW    = DW + $clog2(NANT) + 1;
  localparam int SHIFT = $clog2(NANT);

  logic signed [SW-1:0]   sum_re, sum_im;
  logic signed [DW-1:0]   s_re, s_im;
  logic signed [2*DW+1:0] p_re, p_im;

  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int n = 0; n < NANT; n++) begin
      sum_re += SW'(in_bins[n].re);
      sum_im += SW'(in_bins[n].im);
    end
    s_re = DW'(sum_re >>> SHIFT);
    s_im = DW'(sum_im >>> SHIFT);
    // s * conj(xf)
    p_re = (2*DW+2)'(s_re * xf.re) + (2*DW+2)'(s_im * xf.im);
    p_im = (2*DW+2)'(s_im * xf.re) - (2*DW+2)'(s_re * xf.im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out.re <= sat_dw((DW+8)'(p_re >>> (DW - 1)));
      out.im <= sat_dw((DW+8)'(p_im >>> (DW - 1)));
    end
  end

endmodule
