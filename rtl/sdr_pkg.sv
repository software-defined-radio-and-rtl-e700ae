// sdr_pkg: types and fixed-point helpers shared by the receiver datapaths
// (RAKE receiver, frequency offset correction, FFT, equalizer/de-mapper).
//
// Samples are complex 16-bit signed values. Correction factors, twiddles and
// MRC weights are Q1.15 fractions. Products are rounded half-up and
// saturated back to 16 bits. The document gives the 16-bit data path; the
// rounding and saturation rules are this design's choice.
package sdr_pkg;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  function automatic logic signed [15:0] sat16(logic signed [33:0] v);
    if (v > 34'sd32767)       return 16'sh7fff;
    else if (v < -34'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  // (a) * (b) with b a Q(16-fb).fb fraction: result rounded and saturated.
  function automatic cplx16_t cmul(cplx16_t a, cplx16_t b, int fb);
    logic signed [33:0] r, i, half;
    cplx16_t o;
    half = 34'sd1 <<< (fb - 1);
    r = 34'(a.re * b.re) - 34'(a.im * b.im);
    i = 34'(a.re * b.im) + 34'(a.im * b.re);
    o.re = sat16((r + half) >>> fb);
    o.im = sat16((i + half) >>> fb);
    return o;
  endfunction

  // a * conj(b), same rules.
  function automatic cplx16_t cmul_conj(cplx16_t a, cplx16_t b, int fb);
    cplx16_t bc;
    bc.re = b.re;
    bc.im = -b.im;
    return cmul(a, bc, fb);
  endfunction

endpackage
