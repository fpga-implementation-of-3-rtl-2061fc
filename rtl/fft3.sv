// fft3: 3-point FFT.
//
// Computes Y(q) = a0 + W3^q a1 + W3^(2q) a2 with W3 = exp(-j*2*pi/3), following
// the three-point flow graph: the sum s = a1 + a2 and difference d = a1 - a2 are
// formed once; Y0 = a0 + s; the real part of W3 (-1/2) is applied to s as an
// arithmetic right shift, so no multiplier is spent on it; the imaginary part
// of W3 (-sin 60 deg) is applied to d by one constant multiplier per real part.
//   m  = a0 - s/2,   t = sin60 * d
//   Y1 = m - j t,    Y2 = m + j t
// Two constant multiplications and twelve real additions per transform.
// Purely combinational; datapath format of fft36_pkg.
module fft3
  import fft36_pkg::*;
(
  input  cplx_t a0,
  input  cplx_t a1,
  input  cplx_t a2,
  output cplx_t y0,
  output cplx_t y1,
  output cplx_t y2
);

  cplx_t s, d, m, t;

  always_comb begin
    s    = cadd(a1, a2);
    d    = csub(a1, a2);
    m.re = a0.re - half(s.re);
    m.im = a0.im - half(s.im);
    t.re = mul_sin60(d.re);
    t.im = mul_sin60(d.im);
    y0   = cadd(a0, s);
    // -j*t = t.im - j*t.re ; +j*t = -t.im + j*t.re
    y1.re = m.re + t.im;
    y1.im = m.im - t.re;
    y2.re = m.re - t.im;
    y2.im = m.im + t.re;
  end

endmodule
