// pin_pkg: types and constants shared by the PIN input system.
//
// A PIN is four decimal digits. Digits are held as 4-bit values 0..9 and
// the assembled PIN as a 14-bit binary number 0..9999. The checker reports
// one of three status codes, which the message displays render as "EI"
// (enter input, nothing entered yet), "FA" (false) or two dashes (correct).
// The 4-bit code values are those of the reference design's status signal.
//
// Seven-segment patterns are 8 bits, active low, bit 7 the decimal point
// and bits 6..0 the segments g,f,e,d,c,b,a, as on boards whose displays are
// wired straight to FPGA pins (a 0 lights a segment).
//
// Digit positions ("slots") are numbered 0..3, slot 0 being the first digit
// entered, which is the rightmost (units) digit of the PIN. A slot is
// selected by the two push buttons: {key1,key0} == ~slot, so with both
// buttons at 1 (released on an active-low board) the first digit is loaded
// and with both at 0 the fourth.
package pin_pkg;

  localparam int unsigned NUM_DIGITS = 4;
  localparam int unsigned NUM_SW     = 10;
  localparam int unsigned NUM_LEDS   = 10;
  localparam int unsigned PIN_W      = 14;   // enough for 0..9999

  typedef logic [3:0]       digit_t;
  typedef logic [PIN_W-1:0] pin_t;
  typedef logic [7:0]       seg7_t;

  typedef enum logic [3:0] {
    STATUS_FALSE   = 4'b0000,   // a PIN is entered and matches neither
    STATUS_CORRECT = 4'b0001,   // the PIN matches PIN1 or PIN2
    STATUS_ENTER   = 4'b0011    // the PIN is 0000: nothing entered yet
  } status_e;

  // Active-low seven-segment glyphs, decimal point off.
  localparam seg7_t SEG_BLANK = 8'b1111_1111;
  localparam seg7_t SEG_DASH  = 8'b1011_1111;
  localparam seg7_t SEG_E     = 8'b1000_0110;
  localparam seg7_t SEG_I     = 8'b1100_1111;
  localparam seg7_t SEG_F     = 8'b1000_1110;
  localparam seg7_t SEG_A     = 8'b1000_1000;

  // Button pattern {key1,key0} that selects a digit slot.
  function automatic logic [1:0] slot_keys(input logic [1:0] slot);
    return ~slot;
  endfunction

endpackage
