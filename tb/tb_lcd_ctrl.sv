// tb_lcd_ctrl: runs the LCD writer into the display model with shortened
// timings (1 clock per microsecond) and checks: the four initialisation
// commands once each, the bus timing, that after each refresh (frame_done)
// the screen shows exactly the four text rows, that a change of the text
// appears after the next refresh, and the cycle counts of the power-up wait
// and of one full refresh (84 writes of 1 + SETUP + E + wait cycles).
module tb_lcd_ctrl;
  localparam int unsigned T_PWR = 30, T_CMD = 5, T_CLR = 17, SETUP = 2, EC = 3;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] text [4][20];
  logic       lcd_rs, lcd_rw, lcd_e, frame_done;
  logic [7:0] lcd_db;
  logic [7:0] scr [4][20];
  int n_clear, n_funcset, n_dispon, n_entry, n_unknown, n_data, n_addr, timing_errors;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  lcd_ctrl #(.CLK_HZ(1_000_000), .T_POWERUP_US(T_PWR), .T_CMD_US(T_CMD),
             .T_CLEAR_US(T_CLR), .SETUP_CYC(SETUP), .E_CYC(EC)) dut (
    .clk, .rst_n, .text, .lcd_rs, .lcd_rw, .lcd_e, .lcd_db, .frame_done);

  lcd_model #(.E_MIN(EC), .WAIT_CMD(T_CMD), .WAIT_CLEAR(T_CLR)) panel (
    .clk, .rs(lcd_rs), .rw(lcd_rw), .e(lcd_e), .db(lcd_db), .scr,
    .n_clear, .n_funcset, .n_dispon, .n_entry, .n_unknown, .n_data, .n_addr, .timing_errors);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic random_text();
    for (int r = 0; r < 4; r++) for (int c = 0; c < 20; c++) text[r][c] = 8'(33 + $urandom % 90);
  endtask

  task automatic check_screen(string when);
    int bad = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 20; c++) if (scr[r][c] != text[r][c]) bad++;
    check(bad == 0, $sformatf("%s: %0d characters differ", when, bad));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_first_e, t1, t2;
    localparam int WR = 1 + SETUP + EC + T_CMD;     // cycles per ordinary write
    random_text();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    @(posedge lcd_e);
    t_first_e = cycle;
    // reset releases at t0; power-up count T_PWR+1 (the last edge loads RS/DB), then setup SETUP
    check(t_first_e - t0 == T_PWR + 1 + SETUP,
          $sformatf("first E after %0d cycles", t_first_e - t0));
    @(posedge frame_done);
    t1 = cycle;
    @(negedge clk);
    check_screen("first refresh");
    check(n_funcset == 1 && n_dispon == 1 && n_entry == 1 && n_clear == 1,
          "initialisation commands sent once each");
    check(n_addr == 4 && n_data == 80, $sformatf("%0d address, %0d data writes", n_addr, n_data));
    random_text();
    @(posedge frame_done);   // refresh that may have started with the old text
    @(posedge frame_done);
    t2 = cycle;
    @(negedge clk);
    check_screen("after text change");
    check(t2 - t1 == 2 * 84 * WR, $sformatf("two refreshes took %0d cycles, expected %0d", t2 - t1, 2 * 84 * WR));
    check(lcd_rw == 1'b0, "R/W held low");
    check(n_unknown == 0, "no unknown commands");
    check(timing_errors == 0, $sformatf("%0d bus timing errors", timing_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
