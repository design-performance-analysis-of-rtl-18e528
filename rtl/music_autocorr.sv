// Autocorrelation stage of the MUSIC Doppler estimator.
//
// Input is the vector of M peak samples, one per packet, taken at the
// range/azimuth cell of the target (the "Y_MAX" vector). Its covariance is
// the outer product R = x x^H (M x M). Since R has rank one, this stage keeps
// it in factored form: it stores x (R[i][j] = x_i conj(x_j) is available on
// the r_* port) and accumulates the trace E = sum |x_i|^2, which is R's only
// non-zero eigenvalue. Keeping the factor instead of the M*M matrix is this
// design's choice; it loses nothing for the single-vector covariance.
//
// Interface: s_valid/s_ready stream of M complex samples; `done` pulses the
// clock after the M-th sample, after which `energy` and the read ports are
// valid until the next vector starts. `clear` restarts the accumulation.
// Timing: one sample per clock.
module music_autocorr
  import rsp_pkg::*;
#(
  parameter int M  = 100,
  parameter int EW = 2 * DW + 8     // energy width, integer LSB units squared
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  cplx_t                s_data,
  output logic                 done,
  output logic [EW-1:0]        energy,
  // sample read port (combinational)
  input  logic [$clog2(M)-1:0] x_addr,
  output cplx_t                x_data,
  // covariance element R[i][j] = x_i * conj(x_j), full precision
  input  logic [$clog2(M)-1:0] r_i,
  input  logic [$clog2(M)-1:0] r_j,
  output logic signed [2*DW+1:0] r_re,
  output logic signed [2*DW+1:0] r_im
);

  localparam int IW = $clog2(M);

  cplx_t         xmem [M];
  logic [IW-1:0] cnt;
  logic          full;

  assign s_ready = !full;
  assign x_data  = xmem[x_addr];

  always_comb begin
    r_re = (2*DW+2)'(xmem[r_i].re * xmem[r_j].re) + (2*DW+2)'(xmem[r_i].im * xmem[r_j].im);
    r_im = (2*DW+2)'(xmem[r_i].im * xmem[r_j].re) - (2*DW+2)'(xmem[r_i].re * xmem[r_j].im);
  end

  always_ff @(posedge clk) begin
    if (s_valid && s_ready) xmem[cnt] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      full   <= 1'b0;
      done   <= 1'b0;
      energy <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        cnt    <= '0;
        full   <= 1'b0;
        energy <= '0;
      end else if (s_valid && s_ready) begin
        energy <= energy + EW'(s_data.re * s_data.re) + EW'(s_data.im * s_data.im);
        cnt    <= cnt + 1'b1;
        if (cnt == IW'(M - 1)) begin
          full <= 1'b1;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
