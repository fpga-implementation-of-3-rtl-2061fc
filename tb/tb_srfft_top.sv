// tb_srfft_top: end-to-end test of the whole processor at its default
// parameters (50 MHz LCD timing), with the display model on the LCD bus.
//
// 1. 12-point transforms, single and back to back, and 6-point transforms
//    running at the same time, each checked bin by bin against a direct DFT
//    in reals (rounded outputs: within 0.5 plus fixed-point error), with the
//    2-cycle latency checked.
// 2. With one 12-point result held, each switch setting (00, 01, 11 and the
//    undefined 10) is applied and, two display refreshes later, the 4x20
//    characters on the display model must equal the rows formatted here from
//    the result port, and the page output must name the right page.
// 3. The display bus timing is checked by the model throughout.
// Each mechanism (12-point transform, 6-point transform, back-to-back
// input, each page, display refresh, display clear) is counted, and one that
// never happened counts as a failure.
module tb_srfft_top;
  import fft36_pkg::*;
  import fft_ref_pkg::*;

  localparam real TOL = 0.5 + 16.0 / real'(1 << FRAC);
  localparam int  LATENCY = 2;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, out_valid, in6_valid = 1'b0, out6_valid;
  cin_t       x [12];
  cout_t      X [12];
  cin_t       x6 [6];
  cout_t      X6 [6];
  logic       s0 = 1'b0, s1 = 1'b0;
  logic [1:0] page;
  logic       lcd_rs, lcd_rw, lcd_e, lcd_frame_done;
  logic [7:0] lcd_db;
  logic [7:0] scr [4][20];
  int n_clear, n_funcset, n_dispon, n_entry, n_unknown, n_data, n_addr, timing_errors;

  int checks = 0, failures = 0;
  int cycle = 0;
  int cnt_t12 = 0, cnt_t6 = 0, cnt_b2b = 0, cnt_frames = 0;
  int cnt_page [4] = '{0, 0, 0, 0};

  always #10 clk = ~clk;     // 50 MHz
  always @(posedge clk) cycle++;
  always @(posedge clk) if (lcd_frame_done) cnt_frames++;

  srfft_top dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .X,
    .s0, .s1, .page, .lcd_rs, .lcd_rw, .lcd_e, .lcd_db, .lcd_frame_done,
    .in6_valid, .x6, .out6_valid, .X6);

  lcd_model panel (
    .clk, .rs(lcd_rs), .rw(lcd_rw), .e(lcd_e), .db(lcd_db), .scr,
    .n_clear, .n_funcset, .n_dispon, .n_entry, .n_unknown, .n_data, .n_addr, .timing_errors);

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  // ---------------- expected-result queues ----------------
  localparam int QD = 256;
  real e12r [QD][12], e12i [QD][12], e6r [QD][12], e6i [QD][12];
  int  t12 [QD], t6 [QD];
  int  w12 = 0, r12 = 0, w6 = 0, r6 = 0;
  int  last12 = -10;

  // called at a falling edge: present inputs (12-point if do12, 6-point if do6)
  task automatic send(bit do12, bit do6);
    real xr [12], xi [12], yr [12], yi [12];
    if (do12) begin
      for (int n = 0; n < 12; n++) begin
        x[n].re = rnd_i(); x[n].im = rnd_i();
        xr[n] = real'(x[n].re); xi[n] = real'(x[n].im);
      end
      dft(12, xr, xi, yr, yi);
      e12r[w12 % QD] = yr; e12i[w12 % QD] = yi; t12[w12 % QD] = cycle; w12++;
      if (cycle == last12 + 1) cnt_b2b++;
      last12 = cycle;
    end
    if (do6) begin
      for (int n = 0; n < 12; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
      for (int n = 0; n < 6; n++) begin
        x6[n].re = rnd_i(); x6[n].im = rnd_i();
        xr[n] = real'(x6[n].re); xi[n] = real'(x6[n].im);
      end
      dft(6, xr, xi, yr, yi);
      e6r[w6 % QD] = yr; e6i[w6 % QD] = yi; t6[w6 % QD] = cycle; w6++;
    end
    in_valid  = do12;
    in6_valid = do6;
    @(negedge clk);
    in_valid  = 1'b0;
    in6_valid = 1'b0;
  endtask

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (r12 == w12) fail("12-point result with none pending");
      else begin
        if (cycle - t12[r12 % QD] != LATENCY) fail($sformatf("12-point latency %0d", cycle - t12[r12 % QD]));
        for (int k = 0; k < 12; k++) begin
          int gr, gi;
          gr = int'(X[k].re); gi = int'(X[k].im);
          checks++;
          if (fabs(real'(gr) - e12r[r12 % QD][k]) > TOL || fabs(real'(gi) - e12i[r12 % QD][k]) > TOL)
            fail($sformatf("X%0d got (%0d,%0d) expected (%f,%f)", k, gr, gi,
                           e12r[r12 % QD][k], e12i[r12 % QD][k]));
        end
        r12++;
        cnt_t12++;
      end
    end
    if (out6_valid) begin
      checks++;
      if (r6 == w6) fail("6-point result with none pending");
      else begin
        if (cycle - t6[r6 % QD] != LATENCY) fail($sformatf("6-point latency %0d", cycle - t6[r6 % QD]));
        for (int k = 0; k < 6; k++) begin
          int gr, gi;
          gr = int'(X6[k].re); gi = int'(X6[k].im);
          checks++;
          if (fabs(real'(gr) - e6r[r6 % QD][k]) > TOL || fabs(real'(gi) - e6i[r6 % QD][k]) > TOL)
            fail($sformatf("X6_%0d got (%0d,%0d) expected (%f,%f)", k, gr, gi,
                           e6r[r6 % QD][k], e6i[r6 % QD][k]));
        end
        r6++;
        cnt_t6++;
      end
    end
  end

  // ---------------- display check ----------------
  task automatic show_page(bit sw0, bit sw1, int exp_page);
    string letters = "ABCDEFGHIJKL";
    string row, l;
    int    bad = 0;
    s0 = sw0;
    s1 = sw1;
    @(posedge lcd_frame_done);
    @(posedge lcd_frame_done);
    @(negedge clk);
    checks++;
    if (int'(page) != exp_page) fail($sformatf("page %0d for s0=%0b s1=%0b", page, sw0, sw1));
    for (int r = 0; r < 4; r++) begin
      int bin;
      logic [7:0] re_bits, im_bits;
      bin = 4 * exp_page + r;
      re_bits = X[bin].re;
      im_bits = X[bin].im;
      l   = letters.substr(bin, bin);
      row = $sformatf("%sr%08b%si%08b", l, re_bits, l, im_bits);
      for (int c = 0; c < 20; c++) if (scr[r][c] != row[c]) bad++;
      $display("  display row %0d: %s", r, row);
    end
    checks++;
    if (bad != 0) fail($sformatf("%0d display characters wrong on page %0d", bad, exp_page));
    else cnt_page[{sw0, sw1}]++;
  endtask

  initial begin
    for (int n = 0; n < 12; n++) x[n] = '0;
    for (int n = 0; n < 6; n++) x6[n] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // single transforms, 12- and 6-point together and apart
    for (int i = 0; i < 30; i++) begin
      send(1'b1, (i % 3) != 0);
      repeat ($urandom % 3) @(negedge clk);
    end
    // back-to-back bursts
    for (int i = 0; i < 40; i++) send(1'b1, 1'b1);
    repeat (4) @(negedge clk);
    checks++;
    if (r12 != w12 || r6 != w6) fail("transforms missing at the output");
    // the held result is shown page by page
    show_page(1'b0, 1'b0, 0);
    show_page(1'b0, 1'b1, 1);
    show_page(1'b1, 1'b1, 2);
    show_page(1'b1, 1'b0, 0);
    // a new result replaces the display content
    send(1'b1, 1'b0);
    repeat (4) @(negedge clk);
    show_page(1'b0, 1'b1, 1);

    checks++; if (timing_errors != 0) fail($sformatf("%0d display bus timing errors", timing_errors));
    checks++; if (n_unknown != 0)     fail("unknown display commands");
    checks++; if (n_funcset != 1 || n_dispon != 1 || n_entry != 1) fail("display initialisation");
    // mechanism coverage
    $display("coverage: t12=%0d t6=%0d back-to-back=%0d frames=%0d clears=%0d pages=%0d/%0d/%0d/%0d",
             cnt_t12, cnt_t6, cnt_b2b, cnt_frames, n_clear, cnt_page[0], cnt_page[1], cnt_page[3], cnt_page[2]);
    checks++; if (cnt_t12 == 0)    fail("no 12-point transform");
    checks++; if (cnt_t6 == 0)     fail("no 6-point transform");
    checks++; if (cnt_b2b == 0)    fail("no back-to-back input");
    checks++; if (cnt_frames == 0) fail("no display refresh");
    checks++; if (n_clear == 0)    fail("no display clear");
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (cnt_page[p] == 0) fail($sformatf("switch setting %02b never shown", 2'(p)));
    end
    $display("simulated %0d cycles", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
