// lcd_ctrl: writes four rows of 20 characters to an HD44780-compatible 20x4
// character LCD over its 8-bit parallel bus, over and over, so the display
// follows the FFT outputs.
//
// Sequence: wait T_POWERUP_US after reset; send the commands 0x38 (8-bit bus,
// two-line addressing, 5x8 font), 0x0C (display on, no cursor), 0x06 (move
// right after each write) and 0x01 (clear); then for each row send the
// set-address command 0x80 | {0x00, 0x40, 0x14, 0x54}[row] followed by the
// row's 20 characters as data writes (RS = 1). After row 3, frame_done pulses
// for one clock and the refresh starts again at row 0. R/W is held low: the
// busy flag is never read, fixed waits are used instead.
//
// Bus timing of one write: RS and DB are set and held SETUP_CYC clocks before
// E rises, E is high E_CYC clocks, then E is low for the instruction's wait
// (T_CLEAR_US after clear, T_CMD_US otherwise) while RS and DB stay put.
// At CLK_HZ = 50 MHz one write takes 2015 clocks and a full refresh of the
// 84 writes about 169,000 clocks (3.4 ms).
//
// The source design only states that the results are shown on a 20x4 LCD;
// the controller, its command set and timings are taken from the usual
// HD44780 data-sheet values and are this design's own.
// rst_n also disables the bus-stability assertion, which lint reports as a
// reset used both asynchronously and synchronously; the synthesized logic
// uses it only as the asynchronous reset.
module lcd_ctrl #(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned T_POWERUP_US = 15_000,
  parameter int unsigned T_CMD_US     = 40,
  parameter int unsigned T_CLEAR_US   = 1_640,
  parameter int unsigned SETUP_CYC    = 2,
  parameter int unsigned E_CYC        = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] text [4][20],
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_db,
  output logic       frame_done
);

  localparam int unsigned CYC_US  = (CLK_HZ + 999_999) / 1_000_000;
  localparam int unsigned W_POWER = T_POWERUP_US * CYC_US;
  localparam int unsigned W_CMD   = T_CMD_US * CYC_US;
  localparam int unsigned W_CLEAR = T_CLEAR_US * CYC_US;
  localparam int unsigned CW      = $clog2(W_POWER + W_CLEAR + SETUP_CYC + E_CYC + 2);

  typedef enum logic [1:0] {PH_POWERUP, PH_SETUP, PH_EHIGH, PH_WAIT} phase_t;

  localparam logic [7:0] INIT_CMD [4] = '{8'h38, 8'h0C, 8'h06, 8'h01};
  localparam logic [7:0] ROW_ADDR [4] = '{8'h00, 8'h40, 8'h14, 8'h54};

  phase_t        phase;
  logic [CW-1:0] cnt;
  logic          init_done;
  logic [1:0]    init_idx;
  logic [1:0]    row;
  logic [4:0]    col;          // 0: address command, 1..20: characters

  // The write the sequence is at.
  logic          item_rs;
  logic [7:0]    item_db;
  logic [CW-1:0] item_wait;

  always_comb begin
    if (!init_done) begin
      item_rs   = 1'b0;
      item_db   = INIT_CMD[init_idx];
      item_wait = CW'(item_db == 8'h01 ? W_CLEAR : W_CMD);
    end else if (col == 5'd0) begin
      item_rs   = 1'b0;
      item_db   = 8'h80 | ROW_ADDR[row];
      item_wait = CW'(W_CMD);
    end else begin
      item_rs   = 1'b1;
      item_db   = text[row][col - 5'd1];
      item_wait = CW'(W_CMD);
    end
  end

  assign lcd_rw = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_POWERUP;
      cnt        <= CW'(W_POWER);
      init_done  <= 1'b0;
      init_idx   <= '0;
      row        <= '0;
      col        <= '0;
      lcd_rs     <= 1'b0;
      lcd_e      <= 1'b0;
      lcd_db     <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (phase)
        PH_POWERUP: begin
          if (cnt == '0) begin
            phase  <= PH_SETUP;
            cnt    <= CW'(SETUP_CYC);
            lcd_rs <= item_rs;
            lcd_db <= item_db;
          end else cnt <= cnt - 1'b1;
        end
        PH_SETUP: begin
          if (cnt <= CW'(1)) begin
            phase <= PH_EHIGH;
            cnt   <= CW'(E_CYC);
            lcd_e <= 1'b1;
          end else cnt <= cnt - 1'b1;
        end
        PH_EHIGH: begin
          if (cnt <= CW'(1)) begin
            phase <= PH_WAIT;
            cnt   <= item_wait;
            lcd_e <= 1'b0;
          end else cnt <= cnt - 1'b1;
        end
        PH_WAIT: begin
          if (cnt <= CW'(1)) begin
            // advance to the next write; its RS/DB are loaded next cycle
            phase <= PH_POWERUP;
            cnt   <= '0;
            if (!init_done) begin
              if (init_idx == 2'd3) init_done <= 1'b1;
              init_idx <= init_idx + 1'b1;
            end else if (col == 5'd20) begin
              col <= '0;
              row <= row + 1'b1;
              if (row == 2'd3) frame_done <= 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end else cnt <= cnt - 1'b1;
        end
        default: phase <= PH_POWERUP;
      endcase
    end
  end

  // RS and DB must not change while E is high.
  a_bus_stable: assert property (@(posedge clk) disable iff (!rst_n)
    lcd_e && $past(lcd_e) |-> $stable(lcd_db) && $stable(lcd_rs));

endmodule
