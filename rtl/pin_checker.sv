// pin_checker: compares the entered PIN with the two valid PINs.
//
// A PIN of 0 means nothing has been entered: status ENTER, LEDs off. A
// non-zero PIN equal to PIN1 or PIN2 gives status CORRECT and lights the
// LEDs; any other non-zero PIN gives status FALSE. Because 0 is read as
// "nothing entered", PIN1 and PIN2 must be non-zero. The check is
// combinational and runs all the time, also after the entry window has
// closed, so a correct PIN stays shown as correct.
//
// PIN1 and PIN2 are parameters: the administrator sets them when the design
// is built, as in the reference design where they are constants.
module pin_checker
  import pin_pkg::*;
#(
  parameter int unsigned PIN1 = 2024,
  parameter int unsigned PIN2 = 2023
) (
  input  pin_t    value,
  output status_e status,
  output logic    led
);

  // Both PINs must be four-digit values other than 0000.
  if (PIN1 == 0 || PIN1 > 9999 || PIN2 == 0 || PIN2 > 9999) begin : g_bad_pin
    $error("pin_checker: PIN1 and PIN2 must be in 1..9999");
  end

  always_comb begin
    if (value == '0) begin
      status = STATUS_ENTER;
      led    = 1'b0;
    end else if (value == pin_t'(PIN1) || value == pin_t'(PIN2)) begin
      status = STATUS_CORRECT;
      led    = 1'b1;
    end else begin
      status = STATUS_FALSE;
      led    = 1'b0;
    end
  end

endmodule
