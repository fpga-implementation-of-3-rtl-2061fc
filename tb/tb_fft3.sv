// tb_fft3: checks the 3-point FFT against a direct 3-point DFT in reals.
// Inputs are random fixed-point values up to +-64; the fixed-point result
// may differ from the exact one by the rounding of the shift and of the
// sin 60 deg constant, allowed here as 4 LSBs.
module tb_fft3;
  import fft36_pkg::*;
  import fft_ref_pkg::*;

  cplx_t a [3], y [3];
  int checks = 0, failures = 0;
  localparam real TOL = 4.0 / real'(1 << FRAC);

  fft3 dut (.a0(a[0]), .a1(a[1]), .a2(a[2]), .y0(y[0]), .y1(y[1]), .y2(y[2]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr [12], xi [12], yr [12], yi [12];
    for (int t = 0; t < 400; t++) begin
      for (int n = 0; n < 12; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
      for (int n = 0; n < 3; n++) begin
        a[n].re = rnd_d(FRAC + 7);
        a[n].im = rnd_d(FRAC + 7);
        xr[n] = to_real(a[n].re);
        xi[n] = to_real(a[n].im);
      end
      #1;
      dft(3, xr, xi, yr, yi);
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (fabs(to_real(y[k].re) - yr[k]) > TOL || fabs(to_real(y[k].im) - yi[k]) > TOL) begin
          failures++;
          $display("FAIL Y%0d: got (%f,%f) expected (%f,%f)", k,
                   to_real(y[k].re), to_real(y[k].im), yr[k], yi[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
