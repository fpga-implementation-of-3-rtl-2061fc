// tb_srfft4: checks the 4-point split-radix FFT against a 4-point DFT
// written out with its factors 1, -j, -1, j as exact integer arithmetic.
module tb_srfft4;
  import fft36_pkg::*;
  import fft_ref_pkg::*;

  cplx_t x [4], y [4];
  int checks = 0, failures = 0;

  srfft4 dut (.x0(x[0]), .x1(x[1]), .x2(x[2]), .x3(x[3]),
              .y0(y[0]), .y1(y[1]), .y2(y[2]), .y3(y[3]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ei;
    for (int t = 0; t < 400; t++) begin
      for (int n = 0; n < 4; n++) begin x[n].re = rnd_d(16); x[n].im = rnd_d(16); end
      #1;
      for (int k = 0; k < 4; k++) begin
        er = 0; ei = 0;
        for (int n = 0; n < 4; n++) begin
          // W4^(nk): 0 -> 1, 1 -> -j, 2 -> -1, 3 -> j
          unique case ((n * k) % 4)
            0: begin er += x[n].re; ei += x[n].im; end
            1: begin er += x[n].im; ei -= x[n].re; end
            2: begin er -= x[n].re; ei -= x[n].im; end
            3: begin er -= x[n].im; ei += x[n].re; end
          endcase
        end
        checks += 2;
        if (longint'(y[k].re) != er || longint'(y[k].im) != ei) begin
          failures++;
          $display("FAIL Y%0d: got (%0d,%0d) expected (%0d,%0d)", k, y[k].re, y[k].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
