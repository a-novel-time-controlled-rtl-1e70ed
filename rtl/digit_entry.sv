// digit_entry: register for one digit of the PIN.
//
// The register loads the decoded switch digit on a rising clock edge when
// all of these hold: the reset n_rst is released (1), the entry window is
// open, the two push buttons show the pattern of this slot (see pin_pkg),
// and exactly one switch is on. Otherwise it holds. The reset does not
// clear the digit: when the administrator grants extra time the digits
// entered so far stay, as in the reference design. The digit starts at 0
// at configuration, so the displays show 0000 at power-up.
//
// SLOT 0 is the first digit entered (units), 3 the fourth (thousands).
module digit_entry
  import pin_pkg::*;
#(
  parameter int unsigned SLOT = 0
) (
  input  logic   clk,
  input  logic   n_rst,
  input  logic   window_open,
  input  logic   key0,
  input  logic   key1,
  input  digit_t sw_digit,
  input  logic   sw_valid,
  output digit_t digit
);

  localparam logic [1:0] KEYS = slot_keys(SLOT[1:0]);

  digit_t value = '0;

  always_ff @(posedge clk) begin
    if (n_rst && window_open && ({key1, key0} == KEYS) && sw_valid)
      value <= sw_digit;
  end

  assign digit = value;

endmodule
