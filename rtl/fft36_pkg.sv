// fft36_pkg: number formats and small complex-arithmetic helpers shared by the
// radix-3/6 FFT datapath.
//
// Inputs are small signed integers (IN_W bits per real and imaginary part).
// Inside the datapath every value is a signed fixed-point number of DW bits
// with FRAC fraction bits, wide enough that no sum of the 12-point transform
// can overflow. Results leave as signed integers of OUT_W bits, rounded to
// nearest; the 8-bit result width is the width of one field of a display row.
// Constant multipliers use coefficients with CF_FRAC fraction bits.
package fft36_pkg;

  localparam int IN_W    = 3;   // input width per part (chosen, see README)
  localparam int OUT_W   = 8;   // output width per part (one 8-digit display field)
  localparam int FRAC    = 10;  // fraction bits inside the datapath
  localparam int DW      = 20;  // datapath width: sign + 9 integer + 10 fraction bits
  localparam int CF_FRAC = 14;  // fraction bits of constant coefficients
  // round(sin(60 deg) * 2^CF_FRAC) = round(0.8660254 * 16384)
  localparam int SIN60   = 14189;

  typedef logic signed [DW-1:0]    dval_t;
  typedef logic signed [IN_W-1:0]  ival_t;
  typedef logic signed [OUT_W-1:0] oval_t;

  typedef struct packed { dval_t re; dval_t im; } cplx_t;   // datapath value
  typedef struct packed { ival_t re; ival_t im; } cin_t;    // input sample
  typedef struct packed { oval_t re; oval_t im; } cout_t;   // output bin

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cadd.re = a.re + b.re;
    cadd.im = a.im + b.im;
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    csub.re = a.re - b.re;
    csub.im = a.im - b.im;
  endfunction

  // Multiply by sin(60 deg), rounded to nearest.
  function automatic dval_t mul_sin60(dval_t v);
    logic signed [DW+CF_FRAC+1:0] p;
    p = DW'(v) * (DW+CF_FRAC+2)'(SIN60) + (DW+CF_FRAC+2)'(1 <<< (CF_FRAC-1));
    return dval_t'(p >>> CF_FRAC);
  endfunction

  // Multiply by 1/2: an arithmetic shift, no multiplier.
  function automatic dval_t half(dval_t v);
    return v >>> 1;
  endfunction

  // Input sample to datapath format.
  function automatic cplx_t from_in(cin_t x);
    from_in.re = dval_t'(x.re) <<< FRAC;
    from_in.im = dval_t'(x.im) <<< FRAC;
  endfunction

  // Datapath value to output integer, rounded to nearest (halves go up).
  // The datapath range guarantees the integer part fits in OUT_W bits.
  function automatic oval_t round_out(dval_t v);
    return oval_t'((v + dval_t'(1 <<< (FRAC-1))) >>> FRAC);
  endfunction

  function automatic cout_t to_out(cplx_t v);
    to_out.re = round_out(v.re);
    to_out.im = round_out(v.im);
  endfunction

endpackage
