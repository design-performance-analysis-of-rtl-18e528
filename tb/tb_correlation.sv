// Self-checking testbench of correlation (4 antennas). Random antenna bins
// and transmitted-spectrum bins are applied; the output must equal
// conj(X) * sum(bins) / 4 within 3 LSB (truncation of the antenna sum and of the product), one clock later.
module tb_correlation;
  import rsp_pkg::*;

  localparam int  NANT = 4;
  localparam real SC   = 2.0 ** (DW - 1);

  logic clk = 0, rst_n = 0, in_valid, out_valid;
  cplx_t in_bins [NANT], xf, out;
  int checks = 0, failures = 0;

  correlation #(.NANT(NANT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sr, si, xr, xi, er, ei;
    in_valid = 0; xf = '0;
    for (int n = 0; n < NANT; n++) in_bins[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      in_valid = 1'b1;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < NANT; n++) begin
        in_bins[n] = '{re: DW'(to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1001.0, DW)),
                       im: DW'(to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1001.0, DW))};
        sr += real'(in_bins[n].re) / SC;
        si += real'(in_bins[n].im) / SC;
      end
      sr /= NANT; si /= NANT;
      xf = '{re: DW'(to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1001.0, DW)),
             im: DW'(to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1001.0, DW))};
      xr = real'(xf.re) / SC; xi = real'(xf.im) / SC;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) failures++;
      er = real'(out.re) / SC - (sr * xr + si * xi);
      ei = real'(out.im) / SC - (si * xr - sr * xi);
      checks++;
      if (er * SC > 3.0 || er * SC < -3.0 || ei * SC > 3.0 || ei * SC < -3.0) begin
        failures++;
        if (failures < 6) $display("err %g %g LSB", er * SC, ei * SC);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
