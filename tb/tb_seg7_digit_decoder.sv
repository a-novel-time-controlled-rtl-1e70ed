// tb_seg7_digit_decoder: all 16 inputs of the digit display decoder.
//
// The expected pattern is built from the list of lit segments of each
// digit (a..g), turned into an active-low byte with the decimal point off.
// Inputs 10..15 must blank the display.
module tb_seg7_digit_decoder;
  import pin_pkg::*;

  digit_t digit;
  seg7_t  seg;
  int checks = 0, failures = 0;

  seg7_digit_decoder dut (.digit(digit), .seg(seg));

  // Active-low pattern from a string of lit segment letters.
  function automatic logic [7:0] glyph(input string lit);
    logic [7:0] p = 8'hFF;
    for (int i = 0; i < lit.len(); i++) p[lit[i] - "a"] = 1'b0;
    return p;
  endfunction

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      logic [7:0] expv;
      digit = digit_t'(n);
      expv = (n < 10) ? glyph(lit[n]) : 8'hFF;
      #1;
      checks++;
      if (seg != expv) begin
        failures++;
        $display("FAIL digit=%0d seg=%b expected %b", n, seg, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
