// Shared types of the Falcon / ModFalcon error-detection datapaths.
// ffSampling works on FFT-domain values (complex numbers). They are held here
// as signed fixed-point numbers, FX_W bits with FX_FRAC fraction bits, one for
// the real and one for the imaginary part. Products are kept at full width
// (PROD_W) until after the recomputation check, so that negation commutes with
// every step; only the checked result is rescaled back to FX_W bits.
package falcon_pkg;
  localparam int unsigned FX_W    = 32;
  localparam int unsigned FX_FRAC = 16;
  localparam int unsigned PROD_W  = 2 * FX_W + 4;

  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [PROD_W-1:0] wide_t;

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cfx_t;

  typedef struct packed {
    wide_t re;
    wide_t im;
  } cwide_t;

  function automatic wide_t widen(input fx_t a);
    return wide_t'(a);
  endfunction

  // complex product, full precision: operands are FX_W-bit values widened to
  // PROD_W, so negating them first is always exact
  function automatic cwide_t cmul(input cwide_t a, input cwide_t b);
    cwide_t r;
    r.re = a.re * b.re - a.im * b.im;
    r.im = a.re * b.im + a.im * b.re;
    return r;
  endfunction

  function automatic cwide_t cneg(input cwide_t a);
    cwide_t r;
    r.re = -a.re;
    r.im = -a.im;
    return r;
  endfunction

  function automatic cwide_t cadd(input cwide_t a, input cwide_t b);
    cwide_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cwide_t csub(input cwide_t a, input cwide_t b);
    cwide_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  function automatic cwide_t cwiden(input cfx_t a);
    cwide_t r;
    r.re = widen(a.re);
    r.im = widen(a.im);
    return r;
  endfunction

  // value aligned to product scale (FX_FRAC more fraction bits)
  function automatic cwide_t cscale_up(input cfx_t a);
    cwide_t r;
    r.re = widen(a.re) <<< FX_FRAC;
    r.im = widen(a.im) <<< FX_FRAC;
    return r;
  endfunction

  // product scale back to FX_W bits (arithmetic shift, truncation)
  function automatic cfx_t cscale_down(input cwide_t a);
    cfx_t r;
    r.re = fx_t'(a.re >>> FX_FRAC);
    r.im = fx_t'(a.im >>> FX_FRAC);
    return r;
  endfunction

endpackage
