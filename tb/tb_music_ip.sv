// Self-checking testbench of music_ip at full size (M = 100 packets, K = 200
// Doppler bins). The peak vector is a complex tone at Doppler bin K0 (plus
// noise in the second run). Each output is compared with a floating-point
// model of 10*log10(E / (M*E - |a_k^H x|^2)); the spectrum peak must be at
// K0, and the stall-free run must take K*(M+1) clocks from the first output
// bin's start to the last output.
module tb_music_ip;
  import rsp_pkg::*;

  localparam int  M   = 100;
  localparam int  K   = 200;
  localparam real PI  = 3.14159265358979323846;
  localparam real SC  = 2.0 ** (DW - 1);

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready, m_last, busy;
  cplx_t s_data;
  logic signed [DBW-1:0] m_data;
  logic [$clog2(K)-1:0] m_bin;

  int checks = 0, failures = 0;

  music_ip #(.M(M), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [M], xi [M];

  task automatic run(int k0, real amp, real noise, bit stall);
    real f0, e, cr, ci, ar, ai, ph, d, ref_db, got_db, best;
    int  got, bb;
    longint t0, t1;
    f0 = real'(k0 - K / 2) / K;
    for (int i = 0; i < M; i++) begin
      xr[i] = real'(to_fix(amp * $cos(2.0 * PI * f0 * i)
                 + noise * (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0, DW)) / SC;
      xi[i] = real'(to_fix(amp * $sin(2.0 * PI * f0 * i)
                 + noise * (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0, DW)) / SC;
    end
    for (int i = 0; i < M; i++) begin
      s_valid <= 1'b1;
      s_data  <= '{re: DW'(to_fix(xr[i], DW)), im: DW'(to_fix(xi[i], DW))};
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    s_valid <= 1'b0;
    t0 = 0; t1 = 0;
    e = 0.0;
    for (int i = 0; i < M; i++) e += xr[i] * xr[i] + xi[i] * xi[i];
    got = 0; best = -1.0e9; bb = -1;
    while (got < K) begin
      m_ready <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(negedge clk);
      t1++;
      if (m_valid && m_ready) begin
        cr = 0.0; ci = 0.0;
        for (int i = 0; i < M; i++) begin
          ph = 2.0 * PI * real'(((got - K / 2 + K) * i) % K) / K;
          ar = $cos(ph); ai = $sin(ph);
          cr += xr[i] * ar + xi[i] * ai;
          ci += xi[i] * ar - xr[i] * ai;
        end
        d = M * e - (cr * cr + ci * ci);
        got_db = real'(m_data) / (2.0 ** DB_FRAC);
        checks++;
        if (int'(m_bin) != got || m_last != (got == K - 1)) failures++;
        if (d > 1.0e-3 * M * e) begin
          ref_db = 10.0 * $log10(e / d);
          checks++;
          if (got_db - ref_db > 0.1 || ref_db - got_db > 0.1) begin
            failures++;
            if (failures < 8) $display("bin %0d: %g dB, expected %g dB", got, got_db, ref_db);
          end
        end
        if (got_db > best) begin best = got_db; bb = got; end
        got++;
      end
      @(posedge clk);
    end
    m_ready <= 1'b0;
    checks++;
    if (bb != k0) begin
      failures++;
      $display("spectrum peak at bin %0d, expected %0d", bb, k0);
    end
    if (!stall) begin
      checks++;
      if (t1 != K * (M + 1) + 1) begin
        failures++;
        $display("sweep took %0d clocks, expected %0d", t1, K * (M + 1) + 1);
      end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    s_valid = 0; m_ready = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(130, 0.4, 0.0, 1'b0);
    run(57, 0.3, 0.05, 1'b1);
    run(100, 0.5, 0.02, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
