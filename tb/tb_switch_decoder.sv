// tb_switch_decoder: exhaustive test of the switch decoder.
//
// All 1024 switch patterns are applied. A pattern with exactly one switch
// on must give valid=1 and that switch's number as the digit; every other
// pattern must give valid=0 (the digit is then not checked).
module tb_switch_decoder;
  import pin_pkg::*;

  logic [NUM_SW-1:0] sw;
  digit_t            digit;
  logic              valid;
  int checks = 0, failures = 0;

  switch_decoder dut (.sw(sw), .digit(digit), .valid(valid));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 1024; p++) begin
      int n, idx;
      sw = NUM_SW'(p);
      n = 0; idx = -1;
      for (int k = 0; k < 10; k++) if (p & (1 << k)) begin n++; idx = k; end
      #1;
      checks++;
      if (valid !== (n == 1)) begin
        failures++;
        $display("FAIL sw=%b valid=%b expected %b", sw, valid, n == 1);
      end
      if (n == 1) begin
        checks++;
        if (digit != digit_t'(idx)) begin
          failures++;
          $display("FAIL sw=%b digit=%0d expected %0d", sw, digit, idx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
