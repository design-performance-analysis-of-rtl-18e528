// Radix-2 fixed-point FFT / IFFT core with natural-order input and output.
//
// Function: an N-point discrete Fourier transform of one frame of complex
// samples, forward (exp(-j2pi nk/N)) or inverse (exp(+j2pi nk/N)) as chosen by
// `inverse` when the frame starts. The matched filter uses one instance as the
// 1024-point FFT of the received antenna data and one as the 1024-point IFFT
// that returns each angle's correlation to the time domain; the transform
// length, natural output order and the 25-bit phase factor follow the
// accelerator's FFT configuration.
//
// How it works (this design's own choice of architecture): the frame is
// written into a working memory at bit-reversed addresses, then log2(N) stages
// of decimation-in-time butterflies run in place, one butterfly per clock, and
// the memory is read out in natural order. Every butterfly output is halved, so
// the result is DFT/N in both directions (fixed scaling in place of block
// floating point); this keeps every value inside Q1.(DW-1) without
// saturation. Twiddles come from a table of N/2 entries that is
// computed when the design is elaborated.
//
// Interface: AXI-stream-like valid/ready on input (N beats per frame) and
// output (N beats, `out_last` on the final one). The core takes no new frame
// until the previous one has been read out.
//
// Timing: N load cycles + (N/2)*log2(N) butterfly cycles + N unload cycles
// when neither side stalls: 7168 cycles for N = 1024.
module fft_core
  import rsp_pkg::*;
#(
  parameter int N = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inverse,     // sampled with the first input beat of a frame
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  out_last
);

  localparam int LOGN = $clog2(N);

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_DUMP} state_t;

  // Twiddle table W_N^k = exp(-j 2 pi k / N), k = 0 .. N/2-1, built from
  // elaboration-time constants.
  twid_t twid_rom [N/2];
  for (genvar k = 0; k < N / 2; k++) begin : g_tw
    localparam real PH = -2.0 * 3.14159265358979323846 * k / N;
    localparam logic signed [TW-1:0] TRE = TW'(to_fix($cos(PH), TW));
    localparam logic signed [TW-1:0] TIM = TW'(to_fix($sin(PH), TW));
    assign twid_rom[k] = '{re: TRE, im: TIM};
  end

  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] a);
    logic [LOGN-1:0] r;
    for (int i = 0; i < LOGN; i++) r[i] = a[LOGN-1-i];
    return r;
  endfunction

  cplx_t mem [N];

  state_t            state;
  logic              inv_q;
  logic [LOGN-1:0]   cnt;        // load / unload index
  logic [LOGN-2:0]   bfly;       // butterfly index within a stage
  logic [$clog2(LOGN+1)-1:0] stage;

  // Butterfly addressing for the current stage: half span h = 2**stage.
  logic [LOGN-1:0] lo_mask, i0, i1;
  logic [LOGN-2:0] tw_idx;
  twid_t           w;
  cplx_t           a, b;
  logic signed [DW+1:0] t_re, t_im;
  logic signed [DW+2:0] s0_re, s0_im, s1_re, s1_im;
  cplx_t           y0, y1;

  always_comb begin
    lo_mask = LOGN'((1 << stage) - 1);
    // insert a 0 bit at position `stage` of the butterfly index
    i0      = LOGN'((({1'b0, bfly} & ~lo_mask) << 1) | ({1'b0, bfly} & lo_mask));
    i1      = i0 | LOGN'(1 << stage);
    tw_idx  = (LOGN-1)'(({1'b0, bfly} & lo_mask) << (LOGN - 1 - int'(stage)));
    w       = twid_rom[tw_idx];
    if (inv_q) w.im = -w.im;
    a       = mem[i0];
    b       = mem[i1];
    t_re    = cmul_re(b, w);
    t_im    = cmul_im(b, w);
    s0_re   = (DW+3)'(a.re) + (DW+3)'(t_re);
    s0_im   = (DW+3)'(a.im) + (DW+3)'(t_im);
    s1_re   = (DW+3)'(a.re) - (DW+3)'(t_re);
    s1_im   = (DW+3)'(a.im) - (DW+3)'(t_im);
    y0.re   = sat_dw((DW+8)'(s0_re >>> 1));
    y0.im   = sat_dw((DW+8)'(s0_im >>> 1));
    y1.re   = sat_dw((DW+8)'(s1_re >>> 1));
    y1.im   = sat_dw((DW+8)'(s1_im >>> 1));
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_DUMP);
  assign out_data  = mem[cnt];
  assign out_last  = (state == S_DUMP) && (cnt == LOGN'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      inv_q <= 1'b0;
      cnt   <= '0;
      bfly  <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == '0) inv_q <= inverse;
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_CALC;
            bfly  <= '0;
            stage <= '0;
          end
        end
        S_CALC: begin
          bfly <= bfly + 1'b1;
          if (bfly == (LOGN-1)'(N / 2 - 1)) begin
            if (stage == ($bits(stage))'(LOGN - 1)) begin
              state <= S_DUMP;
              cnt   <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_DUMP: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Working memory: bit-reversed writes while loading, in-place butterflies.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem[bitrev(cnt)] <= in_data;
    end else if (state == S_CALC) begin
      mem[i0] <= y0;
      mem[i1] <= y1;
    end
  end

endmodule
