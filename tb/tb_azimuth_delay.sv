// Self-checking testbench of azimuth_delay (4 antennas, 7 angles). Random
// bins are steered to random angles; each output must equal the bin times
// exp(-j*pi*n*sin(theta)) within 3 LSB, one clock after the input.
module tb_azimuth_delay;
  import rsp_pkg::*;

  localparam int  NANT = 4;
  localparam int  NANG = 7;
  localparam real PI   = 3.14159265358979323846;
  localparam real SC   = 2.0 ** (DW - 1);

  logic clk = 0, rst_n = 0, in_valid, out_valid;
  logic [$clog2(NANG)-1:0] angle;
  cplx_t in_bins [NANT], out_bins [NANT];
  int checks = 0, failures = 0;

  azimuth_delay #(.NANT(NANT), .NANG(NANG)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real br [NANT], bi [NANT], th, ph, er, ei, ear, eai;
    int  ang;
    in_valid = 0; angle = '0;
    for (int n = 0; n < NANT; n++) in_bins[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      ang = $urandom_range(0, NANG - 1);
      angle = ang[$clog2(NANG)-1:0];
      in_valid = 1'b1;
      for (int n = 0; n < NANT; n++) begin
        br[n] = (real'($urandom_range(0, 2000)) - 1000.0) / 1500.0;
        bi[n] = (real'($urandom_range(0, 2000)) - 1000.0) / 1500.0;
        in_bins[n] = '{re: DW'(to_fix(br[n], DW)), im: DW'(to_fix(bi[n], DW))};
        br[n] = real'(in_bins[n].re) / SC;
        bi[n] = real'(in_bins[n].im) / SC;
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      th = (-90.0 + 180.0 * ang / (NANG - 1)) * PI / 180.0;
      for (int n = 0; n < NANT; n++) begin
        ph  = -PI * $sin(th) * n;
        ear = br[n] * $cos(ph) - bi[n] * $sin(ph);
        eai = br[n] * $sin(ph) + bi[n] * $cos(ph);
        if (ear > 1.0 - 1.0 / SC) ear = 1.0 - 1.0 / SC;
        if (ear < -1.0) ear = -1.0;
        if (eai > 1.0 - 1.0 / SC) eai = 1.0 - 1.0 / SC;
        if (eai < -1.0) eai = -1.0;
        er = real'(out_bins[n].re) / SC - ear;
        ei = real'(out_bins[n].im) / SC - eai;
        checks++;
        if (er * SC > 3.0 || er * SC < -3.0 || ei * SC > 3.0 || ei * SC < -3.0) begin
          failures++;
          if (failures < 6) $display("ang %0d ant %0d err %g %g LSB", ang, n, er * SC, ei * SC);
        end
      end
      checks++;
      @(negedge clk);
      if (out_valid) failures++;      // single-cycle valid
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
