// tb_twiddle_rot: checks the constant rotation by W12^K for every K = 0..11
// (one instance each) against a complex multiplication by
// cos(2 pi K/12) - j sin(2 pi K/12) in reals. Rotations by 1, -j, -1, j must
// be exact; the others may be off by the rounding of the constants (3 LSBs).
module tb_twiddle_rot;
  import fft36_pkg::*;
  import fft_ref_pkg::*;

  cplx_t a;
  cplx_t y [12];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 12; k++) begin : g_k
    twiddle_rot #(.K(k)) dut (.a, .y(y[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ar, ai, er, ei, ang, tol;
    for (int t = 0; t < 300; t++) begin
      a.re = rnd_d(FRAC + 8);
      a.im = rnd_d(FRAC + 8);
      #1;
      ar = to_real(a.re);
      ai = to_real(a.im);
      for (int k = 0; k < 12; k++) begin
        ang = -2.0 * PI * real'(k) / 12.0;
        er  = ar * $cos(ang) - ai * $sin(ang);
        ei  = ar * $sin(ang) + ai * $cos(ang);
        tol = (k % 3 == 0) ? 1.0e-9 : 3.0 / real'(1 << FRAC);
        checks += 2;
        if (fabs(to_real(y[k].re) - er) > tol || fabs(to_real(y[k].im) - ei) > tol) begin
          failures++;
          $display("FAIL K=%0d: got (%f,%f) expected (%f,%f)", k,
                   to_real(y[k].re), to_real(y[k].im), er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
