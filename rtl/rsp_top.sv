// Programmable-logic part of the joint radar-communication radar receiver.
//
// Two stream accelerators that the processor drives through DMA engines:
//   * matched_filter: per packet, FFT{XMAT} (N) and the echo of NANT antennas
//     (N x NANT) in, the range/azimuth map Y (NANG x N) out;
//   * music_ip: the M-packet peak vector in, the K-bin Doppler
//     pseudo-spectrum out.
// Between them the processor does the peak search (the strongest cell of the
// first packet's map), gathers that cell from all M packets, and runs the
// CLEAN loop, which subtracts the map of a synthetic echo of each detected
// target (itself computed by the matched filter) and searches again. The DMA
// engines, interconnect and processor are outside this module; their
// streams are this module's ports.
//
// Interface: the five streams below, each valid/ready with one word per
// beat; m_y_last ends a packet's map, m_p_last a spectrum. Timing is that of
// the two accelerators, which run independently.
module rsp_top
  import rsp_pkg::*;
#(
  parameter int N    = 1024,
  parameter int NANT = 32,
  parameter int NANG = 181,
  parameter int M    = 100,
  parameter int K    = 200
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // matched filtering DMA streams
  input  logic                    s_xf_valid,
  output logic                    s_xf_ready,
  input  cplx_t                   s_xf_data,
  input  logic                    s_rx_valid,
  output logic                    s_rx_ready,
  input  cplx_t                   s_rx_data,
  output logic                    m_y_valid,
  input  logic                    m_y_ready,
  output cplx_t                   m_y_data,
  output logic                    m_y_last,
  output logic [$clog2(NANG)-1:0] m_y_angle,
  output logic                    mf_busy,
  // MUSIC DMA streams
  input  logic                    s_ymax_valid,
  output logic                    s_ymax_ready,
  input  cplx_t                   s_ymax_data,
  output logic                    m_p_valid,
  input  logic                    m_p_ready,
  output logic signed [DBW-1:0]   m_p_data,
  output logic                    m_p_last,
  output logic [$clog2(K)-1:0]    m_p_bin,
  output logic                    music_busy
);

  matched_filter #(.N(N), .NANT(NANT), .NANG(NANG)) u_mf (
    .clk, .rst_n,
    .s_xf_valid, .s_xf_ready, .s_xf_data,
    .s_rx_valid, .s_rx_ready, .s_rx_data,
    .m_y_valid, .m_y_ready, .m_y_data, .m_y_last, .m_y_angle,
    .busy (mf_busy)
  );

  music_ip #(.M(M), .K(K)) u_music (
    .clk, .rst_n,
    .s_valid (s_ymax_valid),
    .s_ready (s_ymax_ready),
    .s_data  (s_ymax_data),
    .m_valid (m_p_valid),
    .m_ready (m_p_ready),
    .m_data  (m_p_data),
    .m_last  (m_p_last),
    .m_bin   (m_p_bin),
    .busy    (music_busy)
  );

endmodule
