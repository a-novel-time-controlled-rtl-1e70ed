// tb_pin_checker: exhaustive test of the PIN checker with PIN1=2024,
// PIN2=2023 (the defaults).
//
// Every 14-bit value is applied. 0 must give ENTER with the LEDs off, 2024
// and 2023 CORRECT with the LEDs on, every other value FALSE with the LEDs
// off.
module tb_pin_checker;
  import pin_pkg::*;

  pin_t    value;
  status_e status;
  logic    led;
  int checks = 0, failures = 0;
  int n_enter = 0, n_correct = 0, n_false = 0;

  pin_checker dut (.value(value), .status(status), .led(led));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < (1 << PIN_W); n++) begin
      logic [3:0] exp_status;
      logic       exp_led;
      value = pin_t'(n);
      if (n == 0)                     begin exp_status = 4'b0011; exp_led = 1'b0; n_enter++;   end
      else if (n == 2024 || n == 2023) begin exp_status = 4'b0001; exp_led = 1'b1; n_correct++; end
      else                            begin exp_status = 4'b0000; exp_led = 1'b0; n_false++;   end
      #1;
      checks++;
      if (status != exp_status || led != exp_led) begin
        failures++;
        if (failures < 10) $display("FAIL value=%0d status=%b led=%b expected %b %b", n, status, led, exp_status, exp_led);
      end
    end
    checks++;
    if (n_enter != 1 || n_correct != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
