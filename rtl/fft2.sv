// fft2: 2-point FFT butterfly.
//
// y0 = a + b and y1 = a - b, the length-2 DFT (W2 = -1). It is the first
// stage of the 6-point and 12-point transforms and the even half of the
// 4-point split-radix FFT. Purely combinational, no multipliers; values are
// in the datapath format of fft36_pkg (signed fixed point, FRAC fraction
// bits), and the datapath is wide enough that the sum cannot overflow.
// The original flow graphs show this block only as a box; the plain
// sum/difference form is the obvious one.
module fft2
  import fft36_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t y0,
  output cplx_t y1
);

  always_comb begin
    y0 = cadd(a, b);
    y1 = csub(a, b);
  end

endmodule
