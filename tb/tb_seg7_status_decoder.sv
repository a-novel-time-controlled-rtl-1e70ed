// tb_seg7_status_decoder: all 16 status codes of the message decoder.
//
// 0011 must show "EI", 0000 "FA", 0001 two dashes, anything else blank.
// Glyphs are built from their lit segments (a..g), active low.
module tb_seg7_status_decoder;
  import pin_pkg::*;

  logic [3:0] status;
  seg7_t      seg_left, seg_right;
  int checks = 0, failures = 0;

  seg7_status_decoder dut (.status(status), .seg_left(seg_left), .seg_right(seg_right));

  function automatic logic [7:0] glyph(input string lit);
    logic [7:0] p = 8'hFF;
    for (int i = 0; i < lit.len(); i++) p[lit[i] - "a"] = 1'b0;
    return p;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      logic [7:0] exp_l, exp_r;
      status = 4'(n);
      case (n)
        3:       begin exp_l = glyph("adefg"); exp_r = glyph("ef");     end // E I (I on the left-hand segments)
        0:       begin exp_l = glyph("aefg");  exp_r = glyph("abcefg"); end // F A
        1:       begin exp_l = glyph("g");     exp_r = glyph("g");      end // - -
        default: begin exp_l = 8'hFF;          exp_r = 8'hFF;           end
      endcase
      #1;
      checks++;
      if (seg_left != exp_l || seg_right != exp_r) begin
        failures++;
        $display("FAIL status=%b got %b %b expected %b %b", status, seg_left, seg_right, exp_l, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
