// switch_decoder: turns the ten digit switches into a decimal digit.
//
// Switch k stands for digit k. The output is valid only when exactly one
// switch is on; with none or several on, valid is 0 and the digit registers
// keep their value, as in the reference design. One decoder serves all
// four digit positions (the reference repeats the decode in each digit
// process). Purely combinational.
module switch_decoder
  import pin_pkg::*;
(
  input  logic [NUM_SW-1:0] sw,
  output digit_t            digit,
  output logic              valid
);

  logic [3:0] ones;   // number of switches that are on

  always_comb begin
    digit = '0;
    ones  = '0;
    for (int unsigned k = 0; k < NUM_SW; k++) begin
      if (sw[k]) begin
        digit = digit_t'(k);
        ones  = ones + 4'd1;
      end
    end
    valid = (ones == 4'd1);
  end

endmodule
