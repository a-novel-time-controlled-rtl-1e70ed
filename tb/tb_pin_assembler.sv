// tb_pin_assembler: exhaustive test of the PIN assembler.
//
// Every combination of four digits 0..9 is applied; the value must be the
// decimal number whose units digit is digits[0] and whose thousands digit
// is digits[3].
module tb_pin_assembler;
  import pin_pkg::*;

  digit_t digits [NUM_DIGITS];
  pin_t   value;
  int checks = 0, failures = 0;

  pin_assembler dut (.digits(digits), .value(value));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10000; n++) begin
      digits[0] = digit_t'(n % 10);
      digits[1] = digit_t'((n / 10) % 10);
      digits[2] = digit_t'((n / 100) % 10);
      digits[3] = digit_t'(n / 1000);
      #1;
      checks++;
      if (value != pin_t'(n)) begin
        failures++;
        if (failures < 10) $display("FAIL digits %0d%0d%0d%0d value=%0d", digits[3], digits[2], digits[1], digits[0], value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
