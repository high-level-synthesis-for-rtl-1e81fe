// tb_ref_pkg: bit-exact reference model used by the testbenches.
//
// It computes the expected results straight from the mathematics, not from
// the RTL structure: the oscillator value comes from cos/sin of the full
// angle (p + 0.5) * 2*pi / 2^13 truncated towards zero to Q6.10, the complex
// product uses the ordinary four-multiplication formula on integers and the
// power is the direct sum of squares.
package tb_ref_pkg;

  localparam int  NPH  = 8192;
  localparam real PI   = 3.14159265358979323846;
  localparam int  SMAX = 32767;
  localparam int  SMIN = -32768;

  typedef struct {
    int i;
    int q;
  } cplx_t;

  function automatic int q10(input real x);
    return $rtoi(x * 1024.0);    // truncation towards zero
  endfunction

  function automatic cplx_t ref_osc(input int phase);
    real a;
    cplx_t r;
    a = (real'(phase % NPH) + 0.5) * 2.0 * PI / real'(NPH);
    r.i = q10($cos(a));
    r.q = q10($sin(a));
    return r;
  endfunction

  function automatic int sat(input longint x);
    if (x > SMAX) return SMAX;
    if (x < SMIN) return SMIN;
    return int'(x);
  endfunction

  // true when the exact product would not fit and had to be clamped
  function automatic bit cmul_saturates(input cplx_t a, input cplx_t b);
    longint re, im;
    re = (longint'(a.i) * b.i - longint'(a.q) * b.q) >>> 10;
    im = (longint'(a.i) * b.q + longint'(a.q) * b.i) >>> 10;
    return (re > SMAX) || (re < SMIN) || (im > SMAX) || (im < SMIN);
  endfunction

  function automatic cplx_t ref_cmul(input cplx_t a, input cplx_t b);
    cplx_t r;
    r.i = sat((longint'(a.i) * b.i - longint'(a.q) * b.q) >>> 10);
    r.q = sat((longint'(a.i) * b.q + longint'(a.q) * b.i) >>> 10);
    return r;
  endfunction

  function automatic int ref_pinst(input cplx_t x);
    longint p;
    p = (longint'(x.i) * x.i + longint'(x.q) * x.q) >>> 10;
    return (p > SMAX) ? SMAX : int'(p);
  endfunction

  function automatic bit pinst_saturates(input cplx_t x);
    return ((longint'(x.i) * x.i + longint'(x.q) * x.q) >>> 10) > SMAX;
  endfunction

  // random sample in [-lim, lim]
  function automatic int rnd(input int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

endpackage
