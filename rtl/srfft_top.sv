// srfft_top: radix-3/6 split-radix FFT processor with its display front end.
//
// Main datapath: a 12-point radix-3/6 FFT (fft12), two pipeline stages, one
// transform per clock. Its twelve complex results are held in the output
// register until the next transform and shown on a 20x4 character LCD: the
// switches s0/s1 select a page of four bins (lcd_page) and lcd_ctrl writes
// the four text rows to the display continuously.
// Beside it, and independent of it, stands the 6-point radix-3/6 FFT (fft6),
// with its own input and output ports.
//
// Interface:
//   clk, rst_n                 clock; asynchronous active-low reset
//   in_valid, x[12]            12-point input vector, IN_W-bit signed parts
//   out_valid, X[12]           12-point result, OUT_W-bit signed parts,
//                              2 cycles after in_valid
//   s0, s1, page               display page select and the page shown
//   lcd_rs/rw/e/db             HD44780-style 8-bit LCD bus
//   lcd_frame_done             one-clock pulse after each complete refresh
//   in6_valid, x6[6]           6-point input vector
//   out6_valid, X6[6]          6-point result, 2 cycles after in6_valid
// CLK_HZ sets the LCD bus timing (50 MHz board oscillator by default).
// The original board version had its input vector fixed in the FPGA; here
// the inputs are ports so any vector can be transformed.
module srfft_top
  import fft36_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  // 12-point transform
  input  logic       in_valid,
  input  cin_t       x [12],
  output logic       out_valid,
  output cout_t      X [12],
  // display
  input  logic       s0,
  input  logic       s1,
  output logic [1:0] page,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_db,
  output logic       lcd_frame_done,
  // 6-point transform
  input  logic       in6_valid,
  input  cin_t       x6 [6],
  output logic       out6_valid,
  output cout_t      X6 [6]
);

  logic [7:0] text [4][20];

  fft12 u_fft12 (
    .clk, .rst_n, .in_valid, .x, .out_valid, .X
  );

  lcd_page u_page (
    .X, .s0, .s1, .page, .text
  );

  lcd_ctrl #(.CLK_HZ(CLK_HZ)) u_lcd (
    .clk, .rst_n, .text,
    .lcd_rs, .lcd_rw, .lcd_e, .lcd_db,
    .frame_done(lcd_frame_done)
  );

  fft6 u_fft6 (
    .clk, .rst_n,
    .in_valid(in6_valid), .x(x6), .out_valid(out6_valid), .X(X6)
  );

endmodule
