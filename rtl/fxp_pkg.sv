// fxp_pkg: shared fixed-point and complex-number types for the power-flow solver.
//
// Every quantity is a signed 32-bit fixed-point number with 16 integer and 16
// fractional bits (Q16.16), and a complex number is a pair of them. This
// format is the one the solver is specified with. The helper functions here
// are the combinational primitives (add, subtract, multiply, conjugate) that
// the datapath units build on. Multiplication keeps the full 64-bit product
// and rounds it to nearest before dropping the 16 extra fractional bits; the
// rounding mode is a choice of this implementation.
package fxp_pkg;

  localparam int unsigned FX_W    = 32;
  localparam int unsigned FX_FRAC = 16;

  typedef logic signed [FX_W-1:0] fx_t;

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cplx_t;

  localparam fx_t FX_ONE = fx_t'(32'sd1 <<< FX_FRAC);
  localparam fx_t FX_MAX = fx_t'(32'sh7FFF_FFFF);
  localparam fx_t FX_MIN = fx_t'(32'sh8000_0000);

  // Round-to-nearest Q16.16 product.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = 64'(a) * 64'(b);
    p = p + (64'sd1 <<< (FX_FRAC - 1));
    return fx_t'(p >>> FX_FRAC);
  endfunction

  function automatic cplx_t cx_add(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t cx_sub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  function automatic cplx_t cx_conj(cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = -a.im;
    return r;
  endfunction

  // (a.re + j a.im)(b.re + j b.im), each partial product rounded.
  function automatic cplx_t cx_mul(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = fx_mul(a.re, b.re) - fx_mul(a.im, b.im);
    r.im = fx_mul(a.re, b.im) + fx_mul(a.im, b.re);
    return r;
  endfunction

  function automatic cplx_t cx_make(fx_t re, fx_t im);
    cplx_t r;
    r.re = re;
    r.im = im;
    return r;
  endfunction

endpackage
