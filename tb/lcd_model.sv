// lcd_model: behavioural model of an HD44780-compatible 20x4 character LCD
// (testbench use only, not synthesizable hardware).
//
// Latches RS/DB on the falling edge of E. Commands understood: 0x01 clear
// (fills with spaces, address 0), 0x80|a set DDRAM address, 0x38 function
// set, 0x0C display on, 0x06 entry mode; other commands are counted as
// unknown. Data writes store a character at the address and increment it.
// DDRAM rows of a 20x4 panel: 0x00-0x13 row 0, 0x40-0x53 row 1,
// 0x14-0x27 row 2, 0x54-0x67 row 3. It also checks the bus timing in
// clock cycles: E high at least E_MIN cycles, RS/DB unchanged while E is high,
// and before each E rise at least WAIT_CMD cycles (WAIT_CLEAR after a
// clear) since the previous E fall; violations are counted.
module lcd_model #(
  parameter int unsigned E_MIN      = 12,
  parameter int unsigned WAIT_CMD   = 2000,
  parameter int unsigned WAIT_CLEAR = 82000
) (
  input  logic       clk,
  input  logic       rs,
  input  logic       rw,
  input  logic       e,
  input  logic [7:0] db,
  output logic [7:0] scr [4][20],
  output int         n_clear,
  output int         n_funcset,
  output int         n_dispon,
  output int         n_entry,
  output int         n_unknown,
  output int         n_data,
  output int         n_addr,
  output int         timing_errors
);

  logic [6:0]  addr = '0;
  logic        e_q = 1'b0;
  logic        rs_q;
  logic [7:0]  db_q;
  longint      cyc = 0, rise_cyc = 0, fall_cyc = -1_000_000_000;
  int unsigned need_wait = 0;

  initial begin
    for (int r = 0; r < 4; r++) for (int c = 0; c < 20; c++) scr[r][c] = 8'h20;
    n_clear = 0; n_funcset = 0; n_dispon = 0; n_entry = 0; n_unknown = 0;
    n_data = 0; n_addr = 0; timing_errors = 0;
  end

  function automatic void put(logic [6:0] a, logic [7:0] ch);
    if (a <= 7'h13)                     scr[0][a]         = ch;
    else if (a >= 7'h40 && a <= 7'h53)  scr[1][a - 7'h40] = ch;
    else if (a >= 7'h14 && a <= 7'h27)  scr[2][a - 7'h14] = ch;
    else if (a >= 7'h54 && a <= 7'h67)  scr[3][a - 7'h54] = ch;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    e_q <= e;
    rs_q <= rs;
    db_q <= db;
    if (e && !e_q) begin                      // E rises
      rise_cyc <= cyc;
      if (cyc - fall_cyc < longint'(need_wait)) begin
        timing_errors <= timing_errors + 1;
        $display("lcd_model: write %0d cycles after the last, needs %0d", cyc - fall_cyc, need_wait);
      end
    end
    if (e && e_q && (rs != rs_q || db != db_q)) begin
      timing_errors <= timing_errors + 1;
      $display("lcd_model: bus changed while E high");
    end
    if (!e && e_q) begin                      // E falls: latch
      fall_cyc <= cyc;
      if (cyc - rise_cyc < longint'(E_MIN)) begin
        timing_errors <= timing_errors + 1;
        $display("lcd_model: E high only %0d cycles", cyc - rise_cyc);
      end
      need_wait <= WAIT_CMD;
      if (rw) begin
        n_unknown <= n_unknown + 1;
      end else if (rs_q) begin
        put(addr, db_q);
        addr   <= addr + 1'b1;
        n_data <= n_data + 1;
      end else if (db_q[7]) begin
        addr   <= db_q[6:0];
        n_addr <= n_addr + 1;
      end else begin
        unique case (db_q)
          8'h01: begin
            for (int r = 0; r < 4; r++) for (int c = 0; c < 20; c++) scr[r][c] = 8'h20;
            addr      <= '0;
            n_clear   <= n_clear + 1;
            need_wait <= WAIT_CLEAR;
          end
          8'h38:   n_funcset <= n_funcset + 1;
          8'h0C:   n_dispon  <= n_dispon + 1;
          8'h06:   n_entry   <= n_entry + 1;
          default: n_unknown <= n_unknown + 1;
        endcase
      end
    end
  end

endmodule
