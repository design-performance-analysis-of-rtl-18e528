// Shared types and constants of the radar signal processor.
//
// All complex samples inside the matched filter and the MUSIC engine are
// signed fixed point with one integer (sign) bit, Q1.(DW-1). DW = 24 is the
// 24-bit word length of the fixed-point build that detected the azimuth with
// no error; TW = 25 is the phase-factor (twiddle) width of the FFT
// configuration. The AXI-stream beats carry one complex sample, real part in
// the low half, imaginary part in the high half.
package rsp_pkg;

  // Data word length (bits per real or imaginary part).
  parameter int DW = 24;
  // Twiddle / phase-factor word length.
  parameter int TW = 25;
  // Fraction bits of the MUSIC pseudo-spectrum output, in dB.
  parameter int DB_FRAC = 8;
  // Width of one MUSIC pseudo-spectrum output word.
  parameter int DBW = 32;

  typedef struct packed {
    logic signed [DW-1:0] im;
    logic signed [DW-1:0] re;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] im;
    logic signed [TW-1:0] re;
  } twid_t;

  // Real value to Q1.(w-1) with rounding and symmetric saturation.
  function automatic longint to_fix(real v, int w);
    real    s;
    longint q;
    longint qmax;
    s    = v * (2.0 ** (w - 1));
    qmax = (longint'(1) <<< (w - 1)) - 1;
    q    = longint'(s);          // rounds to nearest
    if (q > qmax) q = qmax;
    if (q < -qmax) q = -qmax;            // symmetric range, safe to negate
    return q;
  endfunction

  // Complex multiply of a data sample by a twiddle; result rescaled to the
  // data format (twiddle fraction bits dropped) but kept DW+2 bits wide so
  // that the caller can add before it narrows.
  function automatic logic signed [DW+1:0] cmul_re(cplx_t a, twid_t b);
    logic signed [DW+TW:0] p;
    p = (DW+TW+1)'(a.re * b.re) - (DW+TW+1)'(a.im * b.im);
    return (DW+2)'(p >>> (TW - 1));
  endfunction

  function automatic logic signed [DW+1:0] cmul_im(cplx_t a, twid_t b);
    logic signed [DW+TW:0] p;
    p = (DW+TW+1)'(a.re * b.im) + (DW+TW+1)'(a.im * b.re);
    return (DW+2)'(p >>> (TW - 1));
  endfunction

  // Saturate a wider signed value to DW bits.
  function automatic logic signed [DW-1:0] sat_dw(logic signed [DW+7:0] v);
    logic signed [DW+7:0] hi;
    logic signed [DW+7:0] lo;
    hi = (DW+8)'((longint'(1) <<< (DW - 1)) - 1);
    lo = -hi - 1;
    if (v > hi) return hi[DW-1:0];
    if (v < lo) return lo[DW-1:0];
    return v[DW-1:0];
  endfunction

endpackage
