// Azimuth delay: steers the frequency-domain antenna data toward one angle.
//
// For one frequency bin it multiplies the bin of every antenna n by the
// steering factor exp(-j*2*pi*sin(theta)*n*d/lambda) of the selected angle,
// with half-wavelength spacing (d/lambda = 0.5). All NANT antennas are
// processed in parallel, one bin per clock, as the pipelined loop over the
// antennas does in the accelerator. The steering table holds NANG angles
// spread evenly from -90 to +90 degrees (1 degree apart for the default 181)
// by NANT antennas and is computed when the design is elaborated, so it lands
// in LUTs/ROM as in the accelerator.
//
// Interface: `in_valid` with `angle` and NANT bins in; NANT steered bins and
// `out_valid` one clock later. No back-pressure: the stage is always ready.
// The factor's word length (TW bits) and the saturation of the product to
// DW bits are this design's choices.
module azimuth_delay
  import rsp_pkg::*;
#(
  parameter int NANT = 32,
  parameter int NANG = 181
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(NANG)-1:0]  angle,
  input  cplx_t                    in_bins  [NANT],
  output logic                     out_valid,
  output cplx_t                    out_bins [NANT]
);

  localparam real PI = 3.14159265358979323846;

  // Steering table, angle-major.
  twid_t az_rom [NANG][NANT];
  for (genvar t = 0; t < NANG; t++) begin : g_ang
    localparam real THETA = (-90.0 + 180.0 * t / (NANG - 1)) * PI / 180.0;
    for (genvar n = 0; n < NANT; n++) begin : g_ant
      localparam real PH = -2.0 * PI * $sin(THETA) * n * 0.5;
      localparam logic signed [TW-1:0] ARE = TW'(to_fix($cos(PH), TW));
      localparam logic signed [TW-1:0] AIM = TW'(to_fix($sin(PH), TW));
      assign az_rom[t][n] = '{re: ARE, im: AIM};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  for (genvar n = 0; n < NANT; n++) begin : g_mul
    always_ff @(posedge clk) begin
      if (in_valid) begin
        out_bins[n].re <= sat_dw((DW+8)'(cmul_re(in_bins[n], az_rom[angle][n])));
        out_bins[n].im <= sat_dw((DW+8)'(cmul_im(in_bins[n], az_rom[angle][n])));
      end
    end
  end

endmodule
