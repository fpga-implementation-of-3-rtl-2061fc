// tb_fft6: checks the 6-point radix-3/6 FFT pipeline.
//
// Each transform is compared bin by bin with a direct 6-point DFT in reals;
// the output is the rounded integer, so it may lie at most 0.5 (plus a
// little fixed-point error) from the exact value. Covered: random vectors,
// the extreme vectors (all parts at the most negative or most positive
// input value, and alternating signs) that drive the largest results,
// single transforms with the latency measured (2 cycles from in_valid to
// out_valid), a burst of back-to-back transforms at one per cycle, and the
// output holding its value while no new data arrive.
module tb_fft6;
  import fft36_pkg::*;
  import fft_ref_pkg::*;

  localparam int NP = 6;
  localparam int LATENCY = 2;
  localparam real TOL = 0.5 + 16.0 / real'(1 << FRAC);

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  cin_t  x [NP];
  cout_t X [NP];
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  fft6 dut (.clk, .rst_n, .in_valid, .x, .out_valid, .X);

  // vectors sent, in order, and their exact DFTs
  localparam int QD = 256;
  real q_r [QD][12];
  real q_i [QD][12];
  int  q_t [QD];
  int  q_wr = 0, q_rd = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // called at a falling edge: present one vector for the next rising edge; pattern 0 random, 1 all min, 2 all max, 3 alternating
  task automatic send(int pattern);
    real xr [12], xi [12], yr [12], yi [12];
    for (int n = 0; n < 12; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
    for (int n = 0; n < NP; n++) begin
      case (pattern)
        1:       begin x[n].re = ival_t'(-(1 << (IN_W-1)));   x[n].im = ival_t'(-(1 << (IN_W-1))); end
        2:       begin x[n].re = ival_t'((1 << (IN_W-1)) - 1); x[n].im = ival_t'((1 << (IN_W-1)) - 1); end
        3:       begin
                   x[n].re = (n % 2 == 0) ? ival_t'((1 << (IN_W-1)) - 1) : ival_t'(-(1 << (IN_W-1)));
                   x[n].im = (n % 3 == 0) ? ival_t'(-(1 << (IN_W-1))) : ival_t'((1 << (IN_W-1)) - 1);
                 end
        default: begin x[n].re = rnd_i(); x[n].im = rnd_i(); end
      endcase
      xr[n] = real'(x[n].re);
      xi[n] = real'(x[n].im);
    end
    dft(NP, xr, xi, yr, yi);
    q_r[q_wr % QD] = yr;
    q_i[q_wr % QD] = yi;
    q_t[q_wr % QD] = cycle;
    q_wr++;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // result checker, sampling on the falling edge
  always @(negedge clk) begin
    if (out_valid) begin
      real yr [12], yi [12];
      int  t0;
      if (q_rd == q_wr) begin
        failures++;
        $display("FAIL: out_valid with no transform pending");
      end else begin
        yr = q_r[q_rd % QD];
        yi = q_i[q_rd % QD];
        t0 = q_t[q_rd % QD];
        q_rd++;
        checks++;
        if (cycle - t0 != LATENCY) begin
          failures++;
          $display("FAIL latency: %0d cycles", cycle - t0);
        end
        for (int k = 0; k < NP; k++) begin
          int gr, gi;
          gr = int'(X[k].re);
          gi = int'(X[k].im);
          checks += 2;
          if (fabs(real'(gr) - yr[k]) > TOL || fabs(real'(gi) - yi[k]) > TOL) begin
            failures++;
            $display("FAIL X%0d: got (%0d,%0d) expected (%f,%f)", k, gr, gi, yr[k], yi[k]);
          end
        end
      end
    end
  end

  initial begin
    cout_t held [NP];
    for (int n = 0; n < NP; n++) x[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // extremes, one at a time
    for (int p = 1; p <= 3; p++) begin
      send(p);
      repeat (4) @(negedge clk);
    end
    // random single transforms
    for (int i = 0; i < 50; i++) begin
      send(0);
      repeat (1 + ($urandom % 4)) @(negedge clk);
    end
    // back-to-back burst: one transform per cycle
    for (int i = 0; i < 60; i++) send(0);
    repeat (6) @(negedge clk);
    // output holds while idle
    held = X;
    for (int n = 0; n < NP; n++) begin x[n].re = rnd_i(); x[n].im = rnd_i(); end
    repeat (10) @(negedge clk);
    checks++;
    if (X != held || out_valid) begin
      failures++;
      $display("FAIL: output changed while idle");
    end
    checks++;
    if (q_rd != q_wr) begin
      failures++;
      $display("FAIL: %0d transforms never came out", q_wr - q_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
