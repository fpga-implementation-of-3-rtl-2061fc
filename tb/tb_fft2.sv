// tb_fft2: checks the 2-point butterfly against integer sums and differences
// computed here, for random values and the extremes of a 16-bit range.
module tb_fft2;
  import fft36_pkg::*;
  import fft_ref_pkg::*;

  cplx_t a, b, y0, y1;
  int checks = 0, failures = 0;

  fft2 dut (.a, .b, .y0, .y1);

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a.re = rnd_d(16); a.im = rnd_d(16); b.re = rnd_d(16); b.im = rnd_d(16);
      if (i == 0) begin a.re = -32768; a.im = 32767; b.re = -32768; b.im = 32767; end
      #1;
      check(y0.re, longint'(a.re) + longint'(b.re), "y0.re");
      check(y0.im, longint'(a.im) + longint'(b.im), "y0.im");
      check(y1.re, longint'(a.re) - longint'(b.re), "y1.re");
      check(y1.im, longint'(a.im) - longint'(b.im), "y1.im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
