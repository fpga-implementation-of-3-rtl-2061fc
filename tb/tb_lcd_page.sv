// tb_lcd_page: checks the page selection and row text against rows built
// here with $sformatf ("%sr%08b%si%08b"), for random outputs, all four switch
// settings and the extreme values 0x80 / 0x7F / 0xFF / 0x00.
module tb_lcd_page;
  import fft36_pkg::*;

  cout_t      X [12];
  logic       s0, s1;
  logic [1:0] page;
  logic [7:0] text [4][20];
  int checks = 0, failures = 0;

  lcd_page dut (.X, .s0, .s1, .page, .text);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string letters = "ABCDEFGHIJKL";
    string exp_row, l;
    int    exp_page;
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < 12; n++) begin X[n].re = oval_t'($urandom); X[n].im = oval_t'($urandom); end
      if (t == 0) begin X[0].re = 8'h80; X[0].im = 8'h7F; X[1].re = 8'hFF; X[1].im = 8'h00; end
      {s0, s1} = 2'(t);
      #1;
      unique case ({s0, s1})
        2'b00:   exp_page = 0;
        2'b01:   exp_page = 1;
        2'b11:   exp_page = 2;
        default: exp_page = 0;
      endcase
      checks++;
      if (int'(page) != exp_page) begin
        failures++;
        $display("FAIL page: s0=%0b s1=%0b got %0d expected %0d", s0, s1, page, exp_page);
      end
      for (int r = 0; r < 4; r++) begin
        int bin;
        logic [7:0] re_bits, im_bits;
        bin = 4 * exp_page + r;
        re_bits = X[bin].re;
        im_bits = X[bin].im;
        l = letters.substr(bin, bin);
        exp_row = $sformatf("%sr%08b%si%08b", l, re_bits, l, im_bits);
        for (int c = 0; c < 20; c++) begin
          checks++;
          if (text[r][c] != exp_row[c]) begin
            failures++;
            $display("FAIL row %0d col %0d: got '%c' expected '%c' (%s)", r, c, text[r][c], exp_row[c], exp_row);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
