// Frequency-domain matched filter for one radar packet (range x azimuth map).
//
// For one packet it takes the time-domain echo of NANT antennas (N samples
// each) and the spectrum of the transmitted packet, and returns, for each of
// NANG look angles, the N-sample correlation between echo and transmitted
// signal:
//     Y[t] = IFFT( conj(X) .* (1/NANT) sum_n a_t[n] * FFT(rx_n) )
// A peak of |Y| at (t, r) marks a target at angle t and range bin r. The
// datapath follows the accelerator's chain: 1024 FFT -> azimuth delay ->
// correlation -> 1024 IFFT. The transmitted spectrum is held once per packet
// (all antennas send the same waveform) and the echo spectra of all antennas
// are held in NANT parallel bank memories so that one bin of every antenna is
// read each clock.
//
// Phases of one packet:
//   1. XF  : N beats of FFT{XMAT} are stored in the X memory.
//   2. RX  : NANT*N beats of echo samples, antenna by antenna, go through the
//            forward FFT; its output is written to the antenna banks.
//   3. ANG : for each angle, N bins are read (1 clock), steered (1 clock),
//            correlated (1 clock) and fed to the inverse FFT, whose output is
//            the Y row of that angle, streamed out in natural order.
// Both FFTs scale by 1/N, so Y carries an overall 1/(N*N*NANT) factor.
//
// Interface: three valid/ready streams of one complex sample per beat
// (s_xf, s_rx, m_y). m_y carries NANG*N beats per packet, angle-major,
// with m_y_last on the final beat; m_y_angle gives the row of each beat.
// The antenna-major order of the echo stream and the stream framing are this
// design's choices. Timing: about N + NANT*(2+0.5*log2 N)*N +
// NANG*(2+0.5*log2 N)*N clocks per packet without stalls.
module matched_filter
  import rsp_pkg::*;
#(
  parameter int N    = 1024,
  parameter int NANT = 32,
  parameter int NANG = 181
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // spectrum of the transmitted packet
  input  logic                    s_xf_valid,
  output logic                    s_xf_ready,
  input  cplx_t                   s_xf_data,
  // echo samples, antenna-major
  input  logic                    s_rx_valid,
  output logic                    s_rx_ready,
  input  cplx_t                   s_rx_data,
  // matched-filter output Y, angle-major
  output logic                    m_y_valid,
  input  logic                    m_y_ready,
  output cplx_t                   m_y_data,
  output logic                    m_y_last,
  output logic [$clog2(NANG)-1:0] m_y_angle,
  output logic                    busy
);

  localparam int LOGN = $clog2(N);
  localparam int AW   = $clog2(NANT);
  localparam int GW   = $clog2(NANG);

  typedef enum logic [1:0] {P_XF, P_RX, P_ANG} phase_t;
  phase_t phase;

  logic [LOGN-1:0] xf_cnt;
  logic [AW-1:0]   ant_wr;      // antenna whose spectrum the FFT is writing
  logic [LOGN-1:0] bin_wr;
  logic [GW-1:0]   ang;
  logic [LOGN:0]   feed_cnt;    // bins issued for the current angle

  cplx_t xmem [N];
  cplx_t rbank [NANT][N];

  // forward FFT
  logic  f_in_valid, f_in_ready, f_out_valid, f_out_last;
  cplx_t f_out_data;
  // inverse FFT
  logic  i_in_valid, i_in_ready, i_out_valid, i_out_last;
  cplx_t i_in_data, i_out_data;

  // read stage (registered, as block RAM)
  logic            rd_valid;
  cplx_t           rd_bins [NANT];
  cplx_t           rd_xf;
  cplx_t           xf_d;        // X bin aligned with the steered bins
  logic            az_valid;
  cplx_t           az_bins [NANT];

  // ---------------------------------------------------------------- streams
  assign s_xf_ready = (phase == P_XF);
  assign f_in_valid = (phase == P_RX) && s_rx_valid;
  assign s_rx_ready = (phase == P_RX) && f_in_ready;

  fft_core #(.N(N)) u_fft (
    .clk, .rst_n,
    .inverse   (1'b0),
    .in_valid  (f_in_valid),
    .in_ready  (f_in_ready),
    .in_data   (s_rx_data),
    .out_valid (f_out_valid),
    .out_ready (1'b1),
    .out_data  (f_out_data),
    .out_last  (f_out_last)
  );

  fft_core #(.N(N)) u_ifft (
    .clk, .rst_n,
    .inverse   (1'b1),
    .in_valid  (i_in_valid),
    .in_ready  (i_in_ready),
    .in_data   (i_in_data),
    .out_valid (i_out_valid),
    .out_ready (m_y_ready),
    .out_data  (i_out_data),
    .out_last  (i_out_last)
  );

  assign m_y_valid = i_out_valid;
  assign m_y_data  = i_out_data;
  assign m_y_last  = i_out_last && (ang == GW'(NANG - 1));
  assign m_y_angle = ang;
  assign busy      = (phase != P_XF) || (xf_cnt != '0);

  // ------------------------------------------------------------- memories
  always_ff @(posedge clk) begin
    if (s_xf_valid && s_xf_ready) xmem[xf_cnt] <= s_xf_data;
    if (phase == P_RX && f_out_valid) rbank[ant_wr][bin_wr] <= f_out_data;
  end

  // issue one bin per clock while the angle still needs bins; the inverse
  // FFT is in its load phase for the whole burst
  logic issue;
  assign issue = (phase == P_ANG) && (feed_cnt < (LOGN+1)'(N)) && i_in_ready;

  always_ff @(posedge clk) begin
    if (issue) begin
      for (int n = 0; n < NANT; n++) rd_bins[n] <= rbank[n][feed_cnt[LOGN-1:0]];
      rd_xf <= xmem[feed_cnt[LOGN-1:0]];
    end
    if (rd_valid) xf_d <= rd_xf;
  end

  azimuth_delay #(.NANT(NANT), .NANG(NANG)) u_az (
    .clk, .rst_n,
    .in_valid  (rd_valid),
    .angle     (ang),
    .in_bins   (rd_bins),
    .out_valid (az_valid),
    .out_bins  (az_bins)
  );

  correlation #(.NANT(NANT)) u_corr (
    .clk, .rst_n,
    .in_valid  (az_valid),
    .in_bins   (az_bins),
    .xf        (xf_d),
    .out_valid (i_in_valid),
    .out       (i_in_data)
  );

  // ----------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_XF;
      xf_cnt   <= '0;
      ant_wr   <= '0;
      bin_wr   <= '0;
      ang      <= '0;
      feed_cnt <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= issue;
      unique case (phase)
        P_XF: if (s_xf_valid) begin
          xf_cnt <= xf_cnt + 1'b1;
          if (xf_cnt == LOGN'(N - 1)) phase <= P_RX;
        end
        P_RX: if (f_out_valid) begin
          bin_wr <= bin_wr + 1'b1;
          if (f_out_last) begin
            ant_wr <= ant_wr + 1'b1;
            if (ant_wr == AW'(NANT - 1)) begin
              phase    <= P_ANG;
              ant_wr   <= '0;
              ang      <= '0;
              feed_cnt <= '0;
            end
          end
        end
        P_ANG: begin
          if (issue) feed_cnt <= feed_cnt + 1'b1;
          if (i_out_valid && m_y_ready && i_out_last) begin
            feed_cnt <= '0;
            if (ang == GW'(NANG - 1)) begin
              phase <= P_XF;
              ang   <= '0;
            end else begin
              ang <= ang + 1'b1;
            end
          end
        end
        default: phase <= P_XF;
      endcase
    end
  end

  // the inverse FFT must take every correlated bin the pipeline delivers
  assert property (@(posedge clk) disable iff (!rst_n) i_in_valid |-> i_in_ready)
    else $error("inverse FFT refused a correlated bin");

endmodule
