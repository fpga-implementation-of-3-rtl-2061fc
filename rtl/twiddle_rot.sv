// twiddle_rot: multiply by the constant twiddle factor W12^K.
//
// W12^K = exp(-j*2*pi*K/12) = cos(30K deg) - j sin(30K deg). All twiddle
// factors of the 6-point (W6^k = W12^(2k)) and 12-point transforms are of
// this form. When K is a multiple of 3 the factor is 1, -j, -1 or j and the
// rotation is a swap and/or negation of the parts with no multiplier (the
// cheap "special case" butterflies). Otherwise |cos| and |sin| are 1/2 and
// sin 60 deg in some order: the 1/2 is an arithmetic shift and the sin 60
// deg a constant multiplier, so one rotation costs two multipliers and two
// adders: (a + jb)(c - js) = (ac + bs) + j(bc - as).
// Skipping the multiplications for trivial factors and using a shift for 1/2
// follow the original design; the constant-multiplier form is this design's.
// Purely combinational; datapath format of fft36_pkg.
module twiddle_rot
  import fft36_pkg::*;
#(
  parameter int K = 1   // twiddle exponent, W12^K
) (
  input  cplx_t a,
  output cplx_t y
);

  localparam int  KM    = ((K % 12) + 12) % 12;
  // For odd KM |cos| = sin60 and |sin| = 1/2; for even KM the reverse.
  localparam bit  COS_IS_HALF = (KM % 2) == 0;
  localparam bit  COS_NEG     = (KM > 3) && (KM < 9);
  localparam bit  SIN_NEG     = (KM > 6);

  // Multiply a datapath value by |cos| or |sin| of this K.
  function automatic dval_t scale(dval_t v, bit is_half);
    return is_half ? half(v) : mul_sin60(v);
  endfunction

  if (KM % 3 == 0) begin : g_trivial
    always_comb begin
      unique case (KM)
        0:       y = a;                      // x 1
        3:       begin y.re =  a.im; y.im = -a.re; end   // x -j
        6:       begin y.re = -a.re; y.im = -a.im; end   // x -1
        default: begin y.re = -a.im; y.im =  a.re; end   // x j
      endcase
    end
  end else begin : g_mult
    dval_t ac, bs, bc, as_;
    always_comb begin
      ac  = scale(a.re,  COS_IS_HALF);
      bc  = scale(a.im,  COS_IS_HALF);
      bs  = scale(a.im, !COS_IS_HALF);
      as_ = scale(a.re, !COS_IS_HALF);
      if (COS_NEG) begin ac = -ac; bc = -bc; end
      if (SIN_NEG) begin bs = -bs; as_ = -as_; end
      y.re = ac + bs;
      y.im = bc - as_;
    end
  end

endmodule
