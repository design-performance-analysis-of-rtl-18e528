// MUSIC Doppler-estimation accelerator.
//
// Takes the M-sample peak vector (one complex matched-filter sample per
// packet at the target's range/azimuth cell) and returns the K-point MUSIC
// pseudo-spectrum in dB over the Doppler axis; its peak bin is the target's
// Doppler. The chain follows the accelerator: autocorrelation ->
// eigen-decomposition / noise-subspace estimation -> spectrum generation,
// built from music_autocorr, music_noise_subspace and music_spectrum.
//
// Interface: s_* stream of M complex samples (the sample count frames the
// vector; there is no last flag on the input); m_* stream of K signed dB words
// (DB_FRAC fraction bits), m_last on the final one, m_bin the Doppler bin
// (bin K/2 is zero Doppler). A new vector is accepted once the previous
// spectrum has been sent. Timing: M load clocks, then M+1 clocks per output
// bin when the output is not stalled, about 20,300 clocks for M=100, K=200.
module music_ip
  import rsp_pkg::*;
#(
  parameter int M = 100,
  parameter int K = 200
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  s_valid,
  output logic                  s_ready,
  input  cplx_t                 s_data,
  output logic                  m_valid,
  input  logic                  m_ready,
  output logic signed [DBW-1:0] m_data,
  output logic                  m_last,
  output logic [$clog2(K)-1:0]  m_bin,
  output logic                  busy
);

  localparam int EW = 2 * DW + 8;
  localparam int VW = 128;

  logic                 ac_done, ac_clear;
  logic [EW-1:0]        energy;
  logic [$clog2(M)-1:0] x_addr;
  cplx_t                x_data;
  logic                 ns_busy, ns_valid, ns_ready, ns_lastbin;
  logic [VW-1:0]        ns_d, ns_e;
  logic                 ns_busy_q;
  logic signed [2*DW+1:0] r_re_unused, r_im_unused;

  music_autocorr #(.M(M), .EW(EW)) u_ac (
    .clk, .rst_n,
    .clear   (ac_clear),
    .s_valid, .s_ready, .s_data,
    .done    (ac_done),
    .energy,
    .x_addr, .x_data,
    .r_i     ('0),
    .r_j     ('0),
    .r_re    (r_re_unused),
    .r_im    (r_im_unused)
  );

  music_noise_subspace #(.M(M), .K(K), .EW(EW), .VW(VW)) u_ns (
    .clk, .rst_n,
    .start       (ac_done),
    .energy,
    .x_addr, .x_data,
    .busy        (ns_busy),
    .out_valid   (ns_valid),
    .out_ready   (ns_ready),
    .out_bin     (m_bin),
    .out_lastbin (ns_lastbin),
    .out_d       (ns_d),
    .out_e       (ns_e)
  );

  music_spectrum #(.VW(VW)) u_sp (
    .in_valid  (ns_valid),
    .in_ready  (ns_ready),
    .in_d      (ns_d),
    .in_e      (ns_e),
    .out_valid (m_valid),
    .out_ready (m_ready),
    .out_db    (m_data)
  );

  assign m_last = m_valid && ns_lastbin;

  // release the sample store once the sweep has finished
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ns_busy_q <= 1'b0;
    else        ns_busy_q <= ns_busy;
  end
  assign ac_clear = ns_busy_q && !ns_busy;
  assign busy     = ns_busy || !s_ready;

endmodule
