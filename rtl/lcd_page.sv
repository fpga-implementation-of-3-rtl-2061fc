// lcd_page: chooses which four of the twelve FFT outputs are shown and turns
// them into the text of a 20-column, 4-row character display.
//
// The two switches pick a page of four consecutive bins, named by the letters
// A..L for X(0)..X(11):
//   s0 = 0, s1 = 0 : A..D (X0..X3)
//   s0 = 0, s1 = 1 : E..H (X4..X7)
//   s0 = 1, s1 = 1 : I..L (X8..X11)
//   s0 = 1, s1 = 0 : A..D (this combination is not defined by the source
//                    design; showing the first page is a choice made here)
// Each row holds one bin in exactly 20 characters:
//   <letter> 'r' <8 binary digits of the real part>
//   <letter> 'i' <8 binary digits of the imaginary part>
// with the most significant (sign) bit first, e.g. "Jr00000000Ji00000001".
// The row text is the page letters, the switch decoding and the binary
// digits as in the source design; the ASCII encoding is for an HD44780-type
// display. Purely combinational.
module lcd_page
  import fft36_pkg::*;
(
  input  cout_t      X [12],
  input  logic       s0,
  input  logic       s1,
  output logic [1:0] page,            // 0: A..D, 1: E..H, 2: I..L
  output logic [7:0] text [4][20]     // ASCII, text[row][column]
);

  localparam int unsigned COLS = 20;

  always_comb begin
    unique case ({s0, s1})
      2'b01:   page = 2'd1;
      2'b11:   page = 2'd2;
      default: page = 2'd0;
    endcase
  end

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      logic [3:0]  bin;
      logic [7:0]  letter;
      bin    = 4'(4 * int'(page) + r);
      letter = 8'("A") + 8'(bin);
      text[r][0]  = letter;
      text[r][1]  = 8'("r");
      text[r][10] = letter;
      text[r][11] = 8'("i");
      for (int b = 0; b < OUT_W; b++) begin
        text[r][2 + b]  = X[bin].re[OUT_W-1-b] ? 8'("1") : 8'("0");
        text[r][12 + b] = X[bin].im[OUT_W-1-b] ? 8'("1") : 8'("0");
      end
    end
  end

  if (2 * OUT_W + 4 != COLS) begin : g_bad_width
    $error("lcd_page: two %0d-bit fields and four labels must fill 20 columns", OUT_W);
  end

endmodule
