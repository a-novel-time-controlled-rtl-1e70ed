// pin_assembler: decimal value of the entered PIN.
//
// value = 1000*d[3] + 100*d[2] + 10*d[1] + d[0], with d[0] the first digit
// entered (units). The constant multiplications are written as shifts and
// adds (1000 = 1024-16-8, 100 = 64+32+4, 10 = 8+2). Combinational.
module pin_assembler
  import pin_pkg::*;
(
  input  digit_t digits [NUM_DIGITS],
  output pin_t   value
);

  pin_t d0, d1, d2, d3;

  always_comb begin
    d0 = pin_t'(digits[0]);
    d1 = pin_t'(digits[1]);
    d2 = pin_t'(digits[2]);
    d3 = pin_t'(digits[3]);
    value = ((d3 << 10) - (d3 << 4) - (d3 << 3))
          + ((d2 << 6) + (d2 << 5) + (d2 << 2))
          + ((d1 << 3) + (d1 << 1))
          + d0;
  end

endmodule
