// Self-checking testbench of matched_filter at a reduced size (64-point
// transforms, 4 antennas, 7 angles 30 degrees apart). A random QPSK packet is
// sent as the transmitted waveform; the echo is that packet delayed by DLY
// samples (circularly) and steered from angle index TANG, plus noise. Every
// output sample is compared with a floating-point model of
//     Y[t] = IDFT( conj(X) .* (1/NANT) sum_n a_t[n] DFT(rx_n) / N ) / N
// and the peak of |Y| must sit at (TANG, DLY). Output back-pressure is random;
// the cycle count of the packet is checked against the stall-free formula.
module tb_matched_filter;
  import rsp_pkg::*;

  localparam int  N    = 64;
  localparam int  NANT = 4;
  localparam int  NANG = 7;
  localparam int  LOGN = $clog2(N);
  localparam int  DLY  = 13;
  localparam int  TANG = 4;            // +30 degrees
  localparam real PI   = 3.14159265358979323846;
  localparam real SC   = 2.0 ** (DW - 1);
  localparam real TOL  = 48.0 / SC;

  logic clk = 0, rst_n = 0;
  logic s_xf_valid, s_xf_ready, s_rx_valid, s_rx_ready;
  logic m_y_valid, m_y_ready, m_y_last, busy;
  cplx_t s_xf_data, s_rx_data, m_y_data;
  logic [$clog2(NANG)-1:0] m_y_angle;

  int checks = 0, failures = 0;

  matched_filter #(.N(N), .NANT(NANT), .NANG(NANG)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [N], xi [N];                 // transmitted packet
  real rr [NANT][N], ri [NANT][N];     // echo, as quantised
  real Xr [N], Xi [N];                 // DFT(x)/N, as quantised
  real Yr [NANG][N], Yi [NANG][N];     // reference

  function automatic real q(real v);
    return real'(to_fix(v, DW)) / SC;
  endfunction

  task automatic dft(input real ir [N], input real ii [N], input real sgn,
                     output real or_ [N], output real oi [N]);
    for (int k = 0; k < N; k++) begin
      or_[k] = 0.0; oi[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real ph;
        ph = sgn * 2.0 * PI * real'((n * k) % N) / N;
        or_[k] += ir[n] * $cos(ph) - ii[n] * $sin(ph);
        oi[k]  += ir[n] * $sin(ph) + ii[n] * $cos(ph);
      end
      or_[k] /= N; oi[k] /= N;
    end
  endtask

  task automatic build_reference();
    real fr [NANT][N], fi [NANT][N];
    real tr [N], ti [N], zr [N], zi [N], o_r [N], o_i [N];
    real th, ph, ar, ai, sr, si;
    for (int n = 0; n < NANT; n++) begin
      for (int k = 0; k < N; k++) begin tr[k] = rr[n][k]; ti[k] = ri[n][k]; end
      dft(tr, ti, -1.0, o_r, o_i);
      for (int k = 0; k < N; k++) begin fr[n][k] = o_r[k]; fi[n][k] = o_i[k]; end
    end
    for (int t = 0; t < NANG; t++) begin
      th = (-90.0 + 180.0 * t / (NANG - 1)) * PI / 180.0;
      for (int k = 0; k < N; k++) begin
        sr = 0.0; si = 0.0;
        for (int n = 0; n < NANT; n++) begin
          ph = -PI * $sin(th) * n;
          ar = $cos(ph); ai = $sin(ph);
          sr += fr[n][k] * ar - fi[n][k] * ai;
          si += fr[n][k] * ai + fi[n][k] * ar;
        end
        sr /= NANT; si /= NANT;
        zr[k] = sr * Xr[k] + si * Xi[k];
        zi[k] = si * Xr[k] - sr * Xi[k];
      end
      dft(zr, zi, 1.0, o_r, o_i);
      for (int k = 0; k < N; k++) begin Yr[t][k] = o_r[k]; Yi[t][k] = o_i[k]; end
    end
  endtask

  longint cycles;
  always @(posedge clk) if (busy) cycles++;

  initial begin
    real th0, ph, nr, ni, zr [N], zi [N];
    real best, mag, er, ei;
    int  bt, br, got;
    cycles = 0;
    s_xf_valid = 0; s_rx_valid = 0; m_y_ready = 0;
    s_xf_data = '0; s_rx_data = '0;
    // stimulus
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 1) ? 0.5 : -0.5;
      xi[n] = $urandom_range(0, 1) ? 0.5 : -0.5;
    end
    dft(xr, xi, -1.0, zr, zi);
    for (int k = 0; k < N; k++) begin Xr[k] = q(zr[k]); Xi[k] = q(zi[k]); end
    th0 = (-90.0 + 180.0 * TANG / (NANG - 1)) * PI / 180.0;
    for (int a = 0; a < NANT; a++)
      for (int n = 0; n < N; n++) begin
        int m;
        m  = (n - DLY + N) % N;
        ph = PI * $sin(th0) * a;      // conjugate of the steering table entry
        nr = (real'($urandom_range(0, 200)) - 100.0) / 2000.0;
        ni = (real'($urandom_range(0, 200)) - 100.0) / 2000.0;
        rr[a][n] = q(0.9 * (xr[m] * $cos(ph) - xi[m] * $sin(ph)) + nr);
        ri[a][n] = q(0.9 * (xr[m] * $sin(ph) + xi[m] * $cos(ph)) + ni);
      end
    build_reference();

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

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
        while (got < NANG * N) begin
          m_y_ready <= ($urandom_range(0, 4) != 0);
          @(negedge clk);
          if (m_y_valid && m_y_ready) begin
            int t, r;
            t = got / N; r = got % N;
            er = real'(m_y_data.re) / SC - Yr[t][r];
            ei = real'(m_y_data.im) / SC - Yi[t][r];
            checks++;
            if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
              failures++;
              if (failures < 8) $display("Y[%0d][%0d] err %g %g (ref %g %g)", t, r, er, ei, Yr[t][r], Yi[t][r]);
            end
            checks++;
            if (int'(m_y_angle) != t || m_y_last != (got == NANG * N - 1)) failures++;
            mag = real'(m_y_data.re) ** 2 + real'(m_y_data.im) ** 2;
            if (mag > best) begin best = mag; bt = t; br = r; end
            got++;
          end
          @(posedge clk);
        end
        m_y_ready <= 1'b0;
      end
    join
    checks++;
    if (bt != TANG || br != DLY) begin
      failures++;
      $display("peak at angle %0d range %0d, expected %0d %0d", bt, br, TANG, DLY);
    end
    repeat (3) @(posedge clk);
    // the packet must take at least the stall-free number of cycles
    checks++;
    if (cycles < N + NANT * (2 * N + (N / 2) * LOGN) + NANG * (2 * N + (N / 2) * LOGN)) begin
      failures++;
      $display("packet took %0d cycles, below the minimum", cycles);
    end
    $display("packet cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
