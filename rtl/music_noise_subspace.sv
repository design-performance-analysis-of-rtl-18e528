// Noise-subspace projection of the MUSIC Doppler estimator.
//
// MUSIC splits the covariance R = x x^H into a signal subspace (its
// eigenvector for the one non-zero eigenvalue, x/|x|) and the orthogonal noise
// subspace En, and scores each Doppler candidate k by the noise-subspace
// projection of its steering vector a_k:
//     a_k^H En En^H a_k = M - |a_k^H x|^2 / E ,   E = |x|^2
// This stage produces, per candidate, the numerator D_k = M*E - |c_k|^2 with
// c_k = a_k^H x, and the scaled energy E, both aligned to the same binary
// point, so that the spectrum stage forms P_k = E / D_k. With a rank-one
// covariance the eigenvector is x itself, so no QR iteration is run: that is
// this design's substitute for the QR-based eigen-decomposition.
//
// The K candidates split one cycle per packet evenly: a_k[i] =
// exp(j*2*pi*f_k*i), f_k = (k - K/2)/K, read from a K-entry phase table
// through an incremental phase index, so bin K/2 is zero Doppler.
// c_k takes M multiply-accumulate clocks; the result is then held on the
// out_* handshake until taken. D_k is clamped to at least 1 (an exact match
// would give a zero projection).
//
// Interface: `start` begins a sweep over all K bins (energy and the samples
// must be stable until `busy` falls); x is read through x_addr/x_data.
// Timing: K*(M+1) clocks per sweep when the output is never stalled.
module music_noise_subspace
  import rsp_pkg::*;
#(
  parameter int M  = 100,
  parameter int K  = 200,
  parameter int EW = 2 * DW + 8,
  parameter int VW = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [EW-1:0]        energy,
  output logic [$clog2(M)-1:0] x_addr,
  input  cplx_t                x_data,
  output logic                 busy,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [$clog2(K)-1:0] out_bin,
  output logic                 out_lastbin,
  output logic [VW-1:0]        out_d,
  output logic [VW-1:0]        out_e
);

  localparam int  IW = $clog2(M);
  localparam int  KW = $clog2(K);
  localparam int  CW = DW + TW + IW + 1;
  localparam real PI = 3.14159265358979323846;

  // phase table exp(j*2*pi*p/K)
  twid_t ph_rom [K];
  for (genvar p = 0; p < K; p++) begin : g_ph
    localparam real PH = 2.0 * PI * p / K;
    localparam logic signed [TW-1:0] PRE = TW'(to_fix($cos(PH), TW));
    localparam logic signed [TW-1:0] PIM = TW'(to_fix($sin(PH), TW));
    assign ph_rom[p] = '{re: PRE, im: PIM};
  end

  typedef enum logic [1:0] {N_IDLE, N_ACC, N_HOLD} nstate_t;
  nstate_t state;

  logic [IW-1:0]        idx;
  logic [KW-1:0]        bin;
  logic [KW-1:0]        pidx;       // phase index of a_k[idx]
  logic [KW-1:0]        step;       // (k - K/2) mod K
  logic signed [CW-1:0] c_re, c_im;
  twid_t                a;

  assign x_addr = idx;
  assign a      = ph_rom[pidx];

  always_comb begin
    step = (bin >= KW'(K / 2)) ? KW'(bin - KW'(K / 2)) : KW'(bin + KW'(K / 2));
  end

  // x * conj(a)
  logic signed [DW+TW:0] m_re, m_im;
  always_comb begin
    m_re = (DW+TW+1)'(x_data.re * a.re) + (DW+TW+1)'(x_data.im * a.im);
    m_im = (DW+TW+1)'(x_data.im * a.re) - (DW+TW+1)'(x_data.re * a.im);
  end

  // projection numerator, aligned to 2*(DW-1) + 2*(TW-1) fraction bits
  logic [VW-1:0] csq, me, dd;
  always_comb begin
    csq = VW'(VW'(c_re * c_re) + VW'(c_im * c_im));
    me  = VW'(M) * (VW'(energy) << (2 * (TW - 1)));
    dd  = (me > csq) ? (me - csq) : VW'(1);
    out_d = dd;
    out_e = VW'(energy) << (2 * (TW - 1));
  end

  assign busy        = (state != N_IDLE);
  assign out_valid   = (state == N_HOLD);
  assign out_bin     = bin;
  assign out_lastbin = (bin == KW'(K - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= N_IDLE;
      idx   <= '0;
      bin   <= '0;
      pidx  <= '0;
      c_re  <= '0;
      c_im  <= '0;
    end else begin
      unique case (state)
        N_IDLE: if (start) begin
          state <= N_ACC;
          bin   <= '0;
          idx   <= '0;
          pidx  <= '0;
          c_re  <= '0;
          c_im  <= '0;
        end
        N_ACC: begin
          c_re <= c_re + CW'(m_re);
          c_im <= c_im + CW'(m_im);
          pidx <= (32'(pidx) + 32'(step) >= K) ? KW'(32'(pidx) + 32'(step) - K)
                                              : KW'(pidx + step);
          idx  <= idx + 1'b1;
          if (idx == IW'(M - 1)) state <= N_HOLD;
        end
        N_HOLD: if (out_ready) begin
          idx  <= '0;
          pidx <= '0;
          c_re <= '0;
          c_im <= '0;
          if (bin == KW'(K - 1)) begin
            state <= N_IDLE;
          end else begin
            bin   <= bin + 1'b1;
            state <= N_ACC;
          end
        end
        default: state <= N_IDLE;
      endcase
    end
  end

endmodule
