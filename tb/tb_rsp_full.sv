// Full-size testbench of rsp_top with every parameter at its default
// (1024-point transforms, 32 antennas, 181 angles, 100 packets, 200 Doppler
// bins). One complete operation:
//   * one packet through the matched filter: a QPSK packet, echoed by one
//     target at +30 degrees (angle index 120) and range bin 200. The peak of
//     |Y| over the whole 181 x 1024 map must be at that cell, and the rows
//     of three angles are compared with a floating-point model;
//   * one MUSIC sweep over 100 packets: the measured peak sample rotated by
//     a Doppler of bin 137 per packet; the spectrum peak must be bin 137.
module tb_rsp_full;
  import rsp_pkg::*;

  localparam int  N    = 1024;
  localparam int  NANT = 32;
  localparam int  NANG = 181;
  localparam int  M    = 100;
  localparam int  K    = 200;
  localparam int  TANG = 120;
  localparam int  DLY  = 200;
  localparam int  KD   = 137;
  localparam real PI   = 3.14159265358979323846;
  localparam real SC   = 2.0 ** (DW - 1);
  localparam real TOL  = 64.0 / SC;

  logic clk = 0, rst_n = 0;
  logic s_xf_valid, s_xf_ready, s_rx_valid, s_rx_ready, m_y_valid, m_y_ready, m_y_last;
  cplx_t s_xf_data, s_rx_data, m_y_data, s_ymax_data;
  logic [$clog2(NANG)-1:0] m_y_angle;
  logic mf_busy, s_ymax_valid, s_ymax_ready, m_p_valid, m_p_ready, m_p_last, music_busy;
  logic signed [DBW-1:0] m_p_data;
  logic [$clog2(K)-1:0] m_p_bin;

  int checks = 0, failures = 0;

  rsp_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ct [N], st [N];                        // cos/sin of 2*pi*i/N
  real xr [N], xi [N], Xr [N], Xi [N];
  real rr [NANT][N], ri [NANT][N];
  real fr [NANT][N], fi [NANT][N];
  int  cmp_ang [3] = '{TANG, 90, 30};
  real refr [3][N], refi [3][N];

  function automatic real q(real v);
    return real'(to_fix(v, DW)) / SC;
  endfunction

  // DFT/N with sign sgn, by table
  task automatic dft(input real ir [N], input real ii [N], input int sgn,
                     output real o_r [N], output real o_i [N]);
    int idx;
    for (int k = 0; k < N; k++) begin
      o_r[k] = 0.0; o_i[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        idx = (n * k) % N;
        o_r[k] += ir[n] * ct[idx] - ii[n] * sgn * st[idx];
        o_i[k] += ir[n] * sgn * st[idx] + ii[n] * ct[idx];
      end
      o_r[k] /= N; o_i[k] /= N;
    end
  endtask

  longint t_start, t_end;

  initial begin
    real tr [N], ti [N], o_r [N], o_i [N], zr [N], zi [N];
    real th, ph, ar, ai, sr, si, best, mag, er, ei, pr, pi_, vb;
    int  bt, br, got, kb;
    s_xf_valid = 0; s_rx_valid = 0; m_y_ready = 0; s_ymax_valid = 0; m_p_ready = 0;
    s_xf_data = '0; s_rx_data = '0; s_ymax_data = '0;
    for (int i = 0; i < N; i++) begin
      ct[i] = $cos(2.0 * PI * i / N);
      st[i] = $sin(2.0 * PI * i / N);
    end
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 1) ? 0.5 : -0.5;
      xi[n] = $urandom_range(0, 1) ? 0.5 : -0.5;
    end
    dft(xr, xi, -1, o_r, o_i);
    for (int k = 0; k < N; k++) begin Xr[k] = q(o_r[k]); Xi[k] = q(o_i[k]); end
    th = (-90.0 + 180.0 * TANG / (NANG - 1)) * PI / 180.0;
    for (int a = 0; a < NANT; a++)
      for (int n = 0; n < N; n++) begin
        int m;
        m  = (n - DLY + N) % N;
        ph = PI * $sin(th) * a;
        rr[a][n] = q(0.9 * (xr[m] * $cos(ph) - xi[m] * $sin(ph))
                     + (real'($urandom_range(0, 200)) - 100.0) / 2000.0);
        ri[a][n] = q(0.9 * (xr[m] * $sin(ph) + xi[m] * $cos(ph))
                     + (real'($urandom_range(0, 200)) - 100.0) / 2000.0);
      end
    // reference rows
    for (int a = 0; a < NANT; a++) begin
      for (int n = 0; n < N; n++) begin tr[n] = rr[a][n]; ti[n] = ri[a][n]; end
      dft(tr, ti, -1, o_r, o_i);
      for (int k = 0; k < N; k++) begin fr[a][k] = o_r[k]; fi[a][k] = o_i[k]; end
    end
    for (int c = 0; c < 3; c++) begin
      th = (-90.0 + 180.0 * cmp_ang[c] / (NANG - 1)) * PI / 180.0;
      for (int k = 0; k < N; k++) begin
        sr = 0.0; si = 0.0;
        for (int a = 0; a < NANT; a++) begin
          ph = -PI * $sin(th) * a;
          ar = $cos(ph); ai = $sin(ph);
          sr += fr[a][k] * ar - fi[a][k] * ai;
          si += fr[a][k] * ai + fi[a][k] * ar;
        end
        sr /= NANT; si /= NANT;
        zr[k] = sr * Xr[k] + si * Xi[k];
        zi[k] = si * Xr[k] - sr * Xi[k];
      end
      dft(zr, zi, 1, o_r, o_i);
      for (int k = 0; k < N; k++) begin refr[c][k] = o_r[k]; refi[c][k] = o_i[k]; end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    t_start = 0;
    pr = 0.0; pi_ = 0.0;
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
            s_rx_valid <= 1'b1;
            s_rx_data  <= '{re: DW'(to_fix(rr[a][n], DW)), im: DW'(to_fix(ri[a][n], DW))};
            @(posedge clk);
            while (!s_rx_ready) @(posedge clk);
          end
        s_rx_valid <= 1'b0;
      end
      begin
        got = 0; best = 0.0; bt = -1; br = -1;
        m_y_ready <= 1'b1;
        while (got < NANG * N) begin
          @(negedge clk);
          t_start++;
          if (m_y_valid) begin
            int t, r;
            t = got / N; r = got % N;
            for (int c = 0; c < 3; c++)
              if (t == cmp_ang[c]) begin
                er = real'(m_y_data.re) / SC - refr[c][r];
                ei = real'(m_y_data.im) / SC - refi[c][r];
                checks++;
                if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
                  failures++;
                  if (failures < 8) $display("Y[%0d][%0d] err %g %g", t, r, er, ei);
                end
              end
            mag = real'(m_y_data.re) ** 2 + real'(m_y_data.im) ** 2;
            if (mag > best) begin
              best = mag; bt = t; br = r;
              pr = real'(m_y_data.re) / SC; pi_ = real'(m_y_data.im) / SC;
            end
            checks++;
            if (m_y_last != (got == NANG * N - 1)) failures++;
            got++;
          end
          @(posedge clk);
        end
        m_y_ready <= 1'b0;
      end
    join
    $display("matched filter: %0d clocks for one packet, peak at angle %0d range %0d",
             t_start, bt, br);
    checks++;
    if (bt != TANG || br != DLY) failures++;

    // MUSIC over M packets of the peak cell, Doppler bin KD
    fork
      for (int p = 0; p < M; p++) begin
        real f, c0, s0, amp;
        amp = 0.5 / $sqrt(pr * pr + pi_ * pi_);
        f   = 2.0 * PI * real'(KD - K / 2) / K * p;
        c0  = $cos(f); s0 = $sin(f);
        s_ymax_valid <= 1'b1;
        s_ymax_data  <= '{re: DW'(to_fix(amp * (pr * c0 - pi_ * s0), DW)),
                          im: DW'(to_fix(amp * (pr * s0 + pi_ * c0), DW))};
        @(posedge clk);
        while (!s_ymax_ready) @(posedge clk);
      end
      begin
        got = 0; vb = -1.0e9; kb = -1;
        m_p_ready <= 1'b1;
        while (got < K) begin
          @(negedge clk);
          if (m_p_valid) begin
            if (real'(m_p_data) > vb) begin vb = real'(m_p_data); kb = got; end
            got++;
          end
          @(posedge clk);
        end
      end
    join
    s_ymax_valid <= 1'b0;
    $display("MUSIC: peak at Doppler bin %0d (%g dB)", kb, vb / (2.0 ** DB_FRAC));
    checks++;
    if (kb != KD) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
