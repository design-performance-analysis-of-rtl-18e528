// Self-checking testbench of music_autocorr (M = 8). Two random vectors are
// streamed in; the trace energy must equal the integer sum of |x|^2, every
// stored sample and every covariance element x_i conj(x_j) must read back
// exactly, and `done` must pulse once, the clock after the last sample.
module tb_music_autocorr;
  import rsp_pkg::*;

  localparam int M  = 8;
  localparam int EW = 2 * DW + 8;

  logic clk = 0, rst_n = 0, clear, s_valid, s_ready, done;
  cplx_t s_data, x_data;
  logic [EW-1:0] energy;
  logic [$clog2(M)-1:0] x_addr, r_i, r_j;
  logic signed [2*DW+1:0] r_re, r_im;
  int checks = 0, failures = 0;

  music_autocorr #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int done_cnt = 0;
  always @(posedge clk) if (done) done_cnt++;

  initial begin
    longint xr [M], xi [M];
    longint e, er, ei;
    clear = 0; s_valid = 0; s_data = '0; x_addr = '0; r_i = '0; r_j = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      e = 0;
      done_cnt = 0;
      for (int i = 0; i < M; i++) begin
        xr[i] = longint'($urandom_range(0, 2000000)) - 1000000;
        xi[i] = longint'($urandom_range(0, 2000000)) - 1000000;
        e += xr[i] * xr[i] + xi[i] * xi[i];
        @(negedge clk);
        s_valid = 1'b1;
        s_data  = '{re: DW'(xr[i]), im: DW'(xi[i])};
        @(posedge clk);
      end
      @(negedge clk);
      s_valid = 1'b0;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (done_cnt != 1) begin failures++; $display("done pulsed %0d times", done_cnt); end
      checks++;
      if (energy != EW'(e)) begin
        failures++;
        $display("energy %0d expected %0d", energy, e);
      end
      checks++;
      if (s_ready) failures++;          // full until cleared
      for (int i = 0; i < M; i++) begin
        x_addr = i[$clog2(M)-1:0];
        #1;
        checks++;
        if (longint'(x_data.re) != xr[i] || longint'(x_data.im) != xi[i]) failures++;
        for (int j = 0; j < M; j++) begin
          r_i = i[$clog2(M)-1:0];
          r_j = j[$clog2(M)-1:0];
          #1;
          er = xr[i] * xr[j] + xi[i] * xi[j];
          ei = xi[i] * xr[j] - xr[i] * xi[j];
          checks++;
          if (longint'(r_re) != er || longint'(r_im) != ei) failures++;
        end
      end
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      checks++;
      if (!s_ready || energy != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
