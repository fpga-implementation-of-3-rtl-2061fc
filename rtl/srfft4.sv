// srfft4: 4-point split-radix FFT.
//
// Y(k) = sum_n x(n) W4^(nk). The even samples x0, x2 go through a 2-point FFT
// (u0, u1); the odd samples x1, x3 form v0 = x1 + x3 and v1 = x1 - x3, and the
// odd term is rotated by the trivial factor -j (a swap of real and imaginary
// parts with one negation), so the transform uses no multiplier:
//   Y0 = u0 + v0, Y2 = u0 - v0, Y1 = u1 - j v1, Y3 = u1 + j v1.
// In the 12-point transform it computes the length-N/3 sub-DFT of x(3n).
// The original design names this block a 4-point SRFFT without drawing its
// insides; the structure here is the standard split-radix one.
// Purely combinational; datapath format of fft36_pkg.
module srfft4
  import fft36_pkg::*;
(
  input  cplx_t x0,
  input  cplx_t x1,
  input  cplx_t x2,
  input  cplx_t x3,
  output cplx_t y0,
  output cplx_t y1,
  output cplx_t y2,
  output cplx_t y3
);

  cplx_t u0, u1, v0, v1;

  fft2 u_even (.a(x0), .b(x2), .y0(u0), .y1(u1));
  fft2 u_odd  (.a(x1), .b(x3), .y0(v0), .y1(v1));

  always_comb begin
    y0 = cadd(u0, v0);
    y2 = csub(u0, v0);
    // -j*v1 = v1.im - j*v1.re
    y1.re = u1.re + v1.im;
    y1.im = u1.im - v1.re;
    y3.re = u1.re - v1.im;
    y3.im = u1.im + v1.re;
  end

endmodule
