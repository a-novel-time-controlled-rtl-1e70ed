// seg7_digit_decoder: active-low seven-segment pattern of a digit.
//
// Digits 0..9 are shown with the usual segments (7 without segment f);
// any other input blanks the display. Output bit 7 is the decimal point,
// always off. Combinational.
module seg7_digit_decoder
  import pin_pkg::*;
(
  input  digit_t digit,
  output seg7_t  seg
);

  always_comb begin
    unique case (digit)
      4'd0:    seg = 8'b1100_0000;
      4'd1:    seg = 8'b1111_1001;
      4'd2:    seg = 8'b1010_0100;
      4'd3:    seg = 8'b1011_0000;
      4'd4:    seg = 8'b1001_1001;
      4'd5:    seg = 8'b1001_0010;
      4'd6:    seg = 8'b1000_0010;
      4'd7:    seg = 8'b1111_1000;
      4'd8:    seg = 8'b1000_0000;
      4'd9:    seg = 8'b1001_0000;
      default: seg = SEG_BLANK;
    endcase
  end

endmodule
