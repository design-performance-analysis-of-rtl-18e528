// Self-checking testbench of music_spectrum. Random (E, D) pairs spanning
// many decades are applied; the output must equal 10*log10(E/D) dB within
// 0.05 dB, and valid/ready must pass straight through.
module tb_music_spectrum;
  import rsp_pkg::*;

  localparam int VW = 128;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [VW-1:0] in_d, in_e;
  logic signed [DBW-1:0] out_db;
  logic clk = 0;
  int checks = 0, failures = 0;

  music_spectrum #(.VW(VW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_db, got, re, rd;
    int  se, sd;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      se = $urandom_range(0, 100);
      sd = $urandom_range(0, 100);
      in_e = VW'($urandom_range(1, 32'h7fffffff)) << se;
      in_d = VW'($urandom_range(1, 32'h7fffffff)) << sd;
      in_valid  = $urandom_range(0, 1);
      out_ready = $urandom_range(0, 1);
      #1;
      re = real'(in_e >> se) * (2.0 ** se);
      rd = real'(in_d >> sd) * (2.0 ** sd);
      ref_db = 10.0 * $log10(re / rd);
      got = real'(out_db) / (2.0 ** DB_FRAC);
      checks++;
      if (got - ref_db > 0.05 || ref_db - got > 0.05) begin
        failures++;
        if (failures < 6) $display("%g dB expected %g dB", got, ref_db);
      end
      checks++;
      if (out_valid != in_valid || in_ready != out_ready) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
