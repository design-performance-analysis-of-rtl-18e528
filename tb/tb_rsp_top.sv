// End-to-end testbench of rsp_top at a reduced size: 64-point transforms,
// 4 antennas, 7 look angles (30 degrees apart), M = 16 packets, K = 32
// Doppler bins. The testbench plays the processor's part.
//
// Scene: three point targets of falling strength, each with its own range
// delay, angle and Doppler (a per-packet phase rotation), plus noise. For
// every packet the echo of the 4 antennas goes through the matched filter
// and the map Y is kept. Then, for i = 0, 1, 2:
//   1. peak search on packet 0 of the (residue) map must find target i's
//      angle and range;
//   2. the M samples of that cell go through MUSIC, whose peak must be
//      target i's Doppler bin;
//   3. CLEAN (i < 2): a noise-free synthetic echo with the detected range,
//      angle and Doppler is matched-filtered for all M packets, scaled to the
//      detected peak and subtracted from the maps.
// Mechanisms counted (each must occur): matched-filter packets, output
// back-pressure on Y, gaps in the echo stream, MUSIC sweeps, back-pressure on
// the spectrum, CLEAN passes.
module tb_rsp_top;
  import rsp_pkg::*;

  localparam int  N    = 64;
  localparam int  NANT = 4;
  localparam int  NANG = 7;
  localparam int  M    = 16;
  localparam int  K    = 32;
  localparam real PI   = 3.14159265358979323846;
  localparam real SC   = 2.0 ** (DW - 1);

  // targets: angle index, delay, Doppler bin, amplitude
  localparam int  NT = 3;
  int  tt [NT] = '{5, 2, 3};
  int  td [NT] = '{9, 40, 25};
  int  tk [NT] = '{21, 10, 27};
  real ta [NT] = '{0.4, 0.3, 0.2};

  logic clk = 0, rst_n = 0;
  logic s_xf_valid, s_xf_ready, s_rx_valid, s_rx_ready, m_y_valid, m_y_ready, m_y_last;
  cplx_t s_xf_data, s_rx_data, m_y_data, s_ymax_data;
  logic [$clog2(NANG)-1:0] m_y_angle;
  logic mf_busy, s_ymax_valid, s_ymax_ready, m_p_valid, m_p_ready, m_p_last, music_busy;
  logic signed [DBW-1:0] m_p_data;
  logic [$clog2(K)-1:0] m_p_bin;

  int checks = 0, failures = 0;
  int n_packets = 0, n_y_stall = 0, n_rx_gap = 0, n_music = 0, n_p_stall = 0, n_clean = 0;

  rsp_top #(.N(N), .NANT(NANT), .NANG(NANG), .M(M), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (m_y_valid && !m_y_ready) n_y_stall++;
    if (s_rx_ready && !s_rx_valid && mf_busy) n_rx_gap++;
    if (m_p_valid && !m_p_ready) n_p_stall++;
  end

  real xr [N], xi [N], Xr [N], Xi [N];
  real yr [M][NANG][N], yi [M][NANG][N];     // measured map
  real dr [M][NANG][N], di [M][NANG][N];     // map of the synthetic echo

  function automatic real q(real v);
    return real'(to_fix(v, DW)) / SC;
  endfunction

  function automatic real theta(int t);
    return (-90.0 + 180.0 * t / (NANG - 1)) * PI / 180.0;
  endfunction

  // echo sample of one target: delayed packet, steered, Doppler-rotated
  task automatic add_target(int t, int dly, int kd, real amp, int p, int a, int n,
                            inout real er, inout real ei);
    int  m;
    real ph;
    m  = (n - dly + N) % N;
    ph = PI * $sin(theta(t)) * a + 2.0 * PI * real'(kd - K / 2) / K * p;
    er += amp * (xr[m] * $cos(ph) - xi[m] * $sin(ph));
    ei += amp * (xr[m] * $sin(ph) + xi[m] * $cos(ph));
  endtask

  // one packet through the matched filter: the scene (synth=0) or a clean
  // echo of one detected target (synth=1, angle st, delay sd, Doppler sk)
  task automatic mf_packet(int p, bit synth, int st, int sd, int sk);
    int got;
    fork
      begin
        for (int k = 0; k < N; k++) begin
          s_xf_valid <= 1'b1;
          s_xf_data  <= '{re: DW'(to_fix(Xr[k], DW)), im: DW'(to_fix(Xi[k], DW))};
          @(posedge clk);
          while (!s_xf_ready) @(posedge clk);
        end
        s_xf_valid <= 1'b0;
        for (int a = 0; a < NANT; a++)
          for (int n = 0; n < N; n++) begin
            real er, ei;
            er = 0.0; ei = 0.0;
            if (synth) begin
              add_target(st, sd, sk, 0.4, p, a, n, er, ei);
            end else begin
              for (int i = 0; i < NT; i++) add_target(tt[i], td[i], tk[i], ta[i], p, a, n, er, ei);
              er += (real'($urandom_range(0, 200)) - 100.0) / 4000.0;
              ei += (real'($urandom_range(0, 200)) - 100.0) / 4000.0;
            end
            if ($urandom_range(0, 7) == 0) begin
              s_rx_valid <= 1'b0;
              @(posedge clk);
            end
            s_rx_valid <= 1'b1;
            s_rx_data  <= '{re: DW'(to_fix(er, DW)), im: DW'(to_fix(ei, DW))};
            @(posedge clk);
            while (!s_rx_ready) @(posedge clk);
          end
        s_rx_valid <= 1'b0;
      end
      begin
        got = 0;
        while (got < NANG * N) begin
          m_y_ready <= ($urandom_range(0, 5) != 0);
          @(negedge clk);
          if (m_y_valid && m_y_ready) begin
            if (synth) begin
              dr[p][got / N][got % N] = real'(m_y_data.re) / SC;
              di[p][got / N][got % N] = real'(m_y_data.im) / SC;
            end else begin
              yr[p][got / N][got % N] = real'(m_y_data.re) / SC;
              yi[p][got / N][got % N] = real'(m_y_data.im) / SC;
            end
            got++;
          end
          @(posedge clk);
        end
        m_y_ready <= 1'b0;
      end
    join
    n_packets++;
  endtask

  // peak vector of one cell through MUSIC; returns the peak Doppler bin
  task automatic music_run(int t, int r, output int kbest);
    int  got;
    real best, v;
    real scale, mx;
    mx = 0.0;
    for (int p = 0; p < M; p++) begin
      if ($sqrt(yr[p][t][r] ** 2 + yi[p][t][r] ** 2) > mx) mx = $sqrt(yr[p][t][r] ** 2 + yi[p][t][r] ** 2);
    end
    scale = 0.5 / mx;                 // the processor normalises the vector
    fork
      for (int p = 0; p < M; p++) begin
        s_ymax_valid <= 1'b1;
        s_ymax_data  <= '{re: DW'(to_fix(yr[p][t][r] * scale, DW)),
                          im: DW'(to_fix(yi[p][t][r] * scale, DW))};
        @(posedge clk);
        while (!s_ymax_ready) @(posedge clk);
      end
      begin
        got = 0; best = -1.0e9; kbest = -1;
        while (got < K) begin
          m_p_ready <= ($urandom_range(0, 3) != 0);
          @(negedge clk);
          if (m_p_valid && m_p_ready) begin
            v = real'(m_p_data) / (2.0 ** DB_FRAC);
            if (v > best) begin best = v; kbest = got; end
            checks++;
            if (m_p_last != (got == K - 1)) failures++;
            got++;
          end
          @(posedge clk);
        end
        m_p_ready <= 1'b0;
      end
    join
    s_ymax_valid <= 1'b0;
    n_music++;
  endtask

  task automatic peak_search(int p, output int bt, output int br);
    real best, v;
    best = -1.0; bt = -1; br = -1;
    for (int t = 0; t < NANG; t++)
      for (int r = 0; r < N; r++) begin
        v = yr[p][t][r] ** 2 + yi[p][t][r] ** 2;
        if (v > best) begin best = v; bt = t; br = r; end
      end
  endtask

  initial begin
    real zr [N], zi [N], ph, ar, ai, den;
    s_xf_valid = 0; s_rx_valid = 0; m_y_ready = 0; s_ymax_valid = 0; m_p_ready = 0;
    s_xf_data = '0; s_rx_data = '0; s_ymax_data = '0;
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 1) ? 0.5 : -0.5;
      xi[n] = $urandom_range(0, 1) ? 0.5 : -0.5;
    end
    // spectrum of the transmitted packet, DFT/N
    for (int k = 0; k < N; k++) begin
      zr[k] = 0.0; zi[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        ph = -2.0 * PI * real'((n * k) % N) / N;
        zr[k] += xr[n] * $cos(ph) - xi[n] * $sin(ph);
        zi[k] += xr[n] * $sin(ph) + xi[n] * $cos(ph);
      end
      Xr[k] = q(zr[k] / N); Xi[k] = q(zi[k] / N);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    for (int p = 0; p < M; p++) mf_packet(p, 1'b0, 0, 0, 0);

    for (int i = 0; i < NT; i++) begin
      int t1, r1, k1;
      peak_search(0, t1, r1);
      checks++;
      if (t1 != tt[i] || r1 != td[i]) begin
        failures++;
        $display("target %0d: peak at angle %0d range %0d, expected %0d %0d", i, t1, r1, tt[i], td[i]);
      end
      music_run(t1, r1, k1);
      checks++;
      if (k1 != tk[i]) begin
        failures++;
        $display("target %0d: Doppler bin %0d, expected %0d", i, k1, tk[i]);
      end
      if (i < NT - 1) begin
        // CLEAN: synthetic echo of the detected target through the same filter
        for (int p = 0; p < M; p++) mf_packet(p, 1'b1, t1, r1, k1);
        n_clean++;
        den = dr[0][t1][r1] ** 2 + di[0][t1][r1] ** 2;
        ar = (yr[0][t1][r1] * dr[0][t1][r1] + yi[0][t1][r1] * di[0][t1][r1]) / den;
        ai = (yi[0][t1][r1] * dr[0][t1][r1] - yr[0][t1][r1] * di[0][t1][r1]) / den;
        for (int p = 0; p < M; p++)
          for (int t = 0; t < NANG; t++)
            for (int r = 0; r < N; r++) begin
              yr[p][t][r] -= ar * dr[p][t][r] - ai * di[p][t][r];
              yi[p][t][r] -= ar * di[p][t][r] + ai * dr[p][t][r];
            end
      end
    end

    $display("packets=%0d y_stalls=%0d rx_gaps=%0d music_runs=%0d p_stalls=%0d clean=%0d",
             n_packets, n_y_stall, n_rx_gap, n_music, n_p_stall, n_clean);
    checks++; if (n_packets == 0) failures++;
    checks++; if (n_y_stall == 0) failures++;
    checks++; if (n_rx_gap == 0)  failures++;
    checks++; if (n_music == 0)   failures++;
    checks++; if (n_p_stall == 0) failures++;
    checks++; if (n_clean != NT - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
