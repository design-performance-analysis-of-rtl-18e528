// Self-checking testbench of fft_core. Feeds random complex frames, forward
// and inverse, and compares every output bin with a direct DFT/N computed in
// real arithmetic. Also checks the butterfly phase length, N/2*log2(N) cycles
// from the last input beat to the first output beat, and applies random
// back-pressure on the output.
module tb_fft_core;
  import rsp_pkg::*;

  localparam int N    = 64;
  localparam int LOGN = $clog2(N);
  localparam real PI  = 3.14159265358979323846;
  localparam real TOL = 16.0 / (2.0 ** (DW - 1));

  logic  clk = 0, rst_n = 0;
  logic  inverse, in_valid, in_ready, out_valid, out_ready, out_last;
  cplx_t in_data, out_data;

  int checks = 0, failures = 0;

  fft_core #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [N], xi [N];

  task automatic run_frame(bit inv, bit stall);
    real yr, yi, ph, er, ei, sgn;
    longint t_last_in, t_first_out, cyc;
    int k;
    sgn = inv ? 1.0 : -1.0;
    for (int n = 0; n < N; n++) begin
      xr[n] = (real'($urandom_range(0, 2000)) - 1000.0) / 2000.0;
      xi[n] = (real'($urandom_range(0, 2000)) - 1000.0) / 2000.0;
    end
    cyc = 0;
    // load
    for (int n = 0; n < N; n++) begin
      in_valid   <= 1'b1;
      inverse    <= inv;
      in_data.re <= DW'(to_fix(xr[n], DW));
      in_data.im <= DW'(to_fix(xi[n], DW));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    t_last_in = 0;
    // wait for the first output, counting cycles
    while (!out_valid) begin
      @(posedge clk);
      t_last_in++;
    end
    checks++;
    if (t_last_in != (N / 2) * LOGN + 1) begin
      failures++;
      $display("latency %0d, expected %0d", t_last_in, (N / 2) * LOGN + 1);
    end
    // unload
    k = 0;
    while (k < N) begin
      out_ready <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk);
      if (out_valid && out_ready) begin
        yr = 0.0; yi = 0.0;
        for (int n = 0; n < N; n++) begin
          ph = sgn * 2.0 * PI * real'(n * k) / real'(N);
          yr += xr[n] * $cos(ph) - xi[n] * $sin(ph);
          yi += xr[n] * $sin(ph) + xi[n] * $cos(ph);
        end
        yr /= N; yi /= N;
        er = real'(out_data.re) / (2.0 ** (DW - 1)) - yr;
        ei = real'(out_data.im) / (2.0 ** (DW - 1)) - yi;
        checks++;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 10) $display("bin %0d inv=%0b err %g %g", k, inv, er, ei);
        end
        checks++;
        if (out_last != (k == N - 1)) failures++;
        k++;
      end
      @(posedge clk);
    end
    out_ready <= 1'b0;
  endtask

  initial begin
    in_valid = 0; out_ready = 0; inverse = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_frame(1'b0, 1'b0);
    run_frame(1'b1, 1'b1);
    run_frame(1'b0, 1'b1);
    run_frame(1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
