// Self-checking testbench of music_noise_subspace (M = 8 packets, K = 16
// Doppler bins). The samples come from a testbench memory on the x read
// port. For every bin the projection numerator must equal
// M*E - |sum_i x_i exp(-j*2*pi*(k-K/2)*i/K)|^2 to within 1e-5 of M*E, the
// energy output must be E exactly, bins must come out in order, and each bin
// must take M+1 clocks when the output is never stalled.
module tb_music_noise_subspace;
  import rsp_pkg::*;

  localparam int  M  = 8;
  localparam int  K  = 16;
  localparam int  EW = 2 * DW + 8;
  localparam int  VW = 128;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = 2.0 ** (DW - 1);
  localparam real AL = 2.0 ** (2 * (DW - 1) + 2 * (TW - 1));   // output binary point

  logic clk = 0, rst_n = 0, start, busy, out_valid, out_ready, out_lastbin;
  logic [EW-1:0] energy;
  logic [$clog2(M)-1:0] x_addr;
  cplx_t x_data;
  logic [$clog2(K)-1:0] out_bin;
  logic [VW-1:0] out_d, out_e;
  int checks = 0, failures = 0;

  cplx_t xm [M];
  assign x_data = xm[x_addr];

  music_noise_subspace #(.M(M), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    xr [M], xi [M], e, cr, ci, ph, d, got;
    longint ei;
    int     k, gap;
    start = 0; out_ready = 0; energy = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      e = 0.0; ei = 0;
      for (int i = 0; i < M; i++) begin
        xm[i] = '{re: DW'($urandom_range(0, 4000000) - 2000000),
                  im: DW'($urandom_range(0, 4000000) - 2000000)};
        xr[i] = real'(xm[i].re) / SC;
        xi[i] = real'(xm[i].im) / SC;
        e  += xr[i] * xr[i] + xi[i] * xi[i];
        ei += longint'(xm[i].re) * longint'(xm[i].re) + longint'(xm[i].im) * longint'(xm[i].im);
      end
      energy = EW'(ei);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      k = 0; gap = 1;
      while (k < K) begin
        out_ready = (rep == 0) ? 1'b1 : ($urandom_range(0, 1) == 1);
        #1;
        if (out_valid && out_ready) begin
          cr = 0.0; ci = 0.0;
          for (int i = 0; i < M; i++) begin
            ph = -2.0 * PI * real'(((k - K / 2 + K) * i) % K) / K;
            cr += xr[i] * $cos(ph) - xi[i] * $sin(ph);
            ci += xr[i] * $sin(ph) + xi[i] * $cos(ph);
          end
          d = M * e - (cr * cr + ci * ci);
          got = real'(out_d) / AL;
          checks++;
          if (got - d > 1.0e-5 * M * e || d - got > 1.0e-5 * M * e) begin
            failures++;
            if (failures < 6) $display("bin %0d: %g expected %g", k, got, d);
          end
          checks++;
          if (out_e != (VW'(ei) << (2 * (TW - 1)))) failures++;
          checks++;
          if (int'(out_bin) != k || out_lastbin != (k == K - 1)) failures++;
          if (rep == 0) begin
            checks++;
            if (gap != M + 1) begin
              failures++;
              $display("bin %0d after %0d clocks, expected %0d", k, gap, M + 1);
            end
          end
          k++;
          gap = 0;
        end
        @(negedge clk);
        gap++;
      end
      out_ready = 1'b0;
      @(negedge clk);
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
