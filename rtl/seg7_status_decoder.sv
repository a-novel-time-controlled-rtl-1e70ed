// seg7_status_decoder: the two message displays next to the PIN digits.
//
// Status ENTER shows "EI" (enter input), FALSE shows "FA", CORRECT shows a
// dash on both displays; any other code blanks them. seg_left is the
// display next to the PIN digits, seg_right the outermost one. Patterns are
// active low, decimal point off. Combinational.
module seg7_status_decoder
  import pin_pkg::*;
(
  input  logic [3:0] status,
  output seg7_t      seg_left,
  output seg7_t      seg_right
);

  always_comb begin
    case (status)
      STATUS_ENTER:   begin seg_left = SEG_E;     seg_right = SEG_I;     end
      STATUS_FALSE:   begin seg_left = SEG_F;     seg_right = SEG_A;     end
      STATUS_CORRECT: begin seg_left = SEG_DASH;  seg_right = SEG_DASH;  end
      default:        begin seg_left = SEG_BLANK; seg_right = SEG_BLANK; end
    endcase
  end

endmodule
