// pin_system_top: time-controlled four-digit PIN input system.
//
// The user enters a four-digit PIN with ten switches (switch k = digit k)
// and two push buttons that pick which digit is being set: {key1,key0} =
// 11 sets the first (units) digit, 10 the second, 01 the third and 00 the
// fourth. The entered digits are shown on four seven-segment displays
// (ex1 = fourth digit, leftmost, to ex4 = first digit) and are compared
// all the time with two built-in PINs, PIN1 and PIN2. Two message displays
// (ex5, ex6) show "EI" while the PIN is 0000, "FA" for a wrong PIN and two
// dashes for a correct one; all ten LEDs light when the PIN is correct.
//
// Time control: a timer counts seconds from power-up. Digits can be
// changed only while seconds <= TIME_LIMIT_S; after that the digit
// registers freeze and the system is locked. The active-low reset n_rst,
// the administrator's extra button, restarts the timer and so gives the
// user another window. It does not clear the digits entered so far.
//
// Inputs are taken as synchronous to clk; switch and button synchronisers
// and debouncing are left to the board wrapper, as in the reference
// design. A digit is loaded on the first clock edge on which its button
// pattern and a single switch are present; the displays and LEDs follow
// combinationally from the digit registers.
module pin_system_top
  import pin_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned TIME_LIMIT_S = 30,
  parameter int unsigned PIN1         = 2024,
  parameter int unsigned PIN2         = 2023
) (
  input  logic                clk,
  input  logic                n_rst,     // administrator reset, active low
  input  logic [NUM_SW-1:0]   sw,
  input  logic                key0,
  input  logic                key1,
  output pin_t                pin_value,  // entered PIN, 0..9999
  output digit_t              digits [NUM_DIGITS], // [0] = first digit (units)
  output logic [3:0]          status,     // status_e code
  output logic [31:0]         seconds,
  output logic                second_tick, // one-cycle pulse per second
  output logic                entry_open, // digits may still be changed
  output seg7_t               ex1,        // fourth digit (thousands)
  output seg7_t               ex2,        // third digit
  output seg7_t               ex3,        // second digit
  output seg7_t               ex4,        // first digit (units)
  output seg7_t               ex5,        // message, left character
  output seg7_t               ex6,        // message, right character
  output logic [NUM_LEDS-1:0] led
);

  digit_t  sw_digit;
  logic    sw_valid;
  status_e status_code;
  logic    led_on;

  second_timer #(
    .CLK_HZ      (CLK_HZ),
    .TIME_LIMIT_S(TIME_LIMIT_S),
    .SEC_W       (32)
  ) u_timer (
    .clk        (clk),
    .n_rst      (n_rst),
    .seconds    (seconds),
    .second_tick(second_tick),
    .window_open(entry_open)
  );

  switch_decoder u_sw_dec (
    .sw   (sw),
    .digit(sw_digit),
    .valid(sw_valid)
  );

  for (genvar i = 0; i < NUM_DIGITS; i++) begin : g_digit
    digit_entry #(.SLOT(i)) u_entry (
      .clk        (clk),
      .n_rst      (n_rst),
      .window_open(entry_open),
      .key0       (key0),
      .key1       (key1),
      .sw_digit   (sw_digit),
      .sw_valid   (sw_valid),
      .digit      (digits[i])
    );
  end

  pin_assembler u_asm (
    .digits(digits),
    .value (pin_value)
  );

  pin_checker #(
    .PIN1(PIN1),
    .PIN2(PIN2)
  ) u_check (
    .value (pin_value),
    .status(status_code),
    .led   (led_on)
  );

  assign status = status_code;
  assign led    = {NUM_LEDS{led_on}};

  seg7_digit_decoder u_seg1 (.digit(digits[3]), .seg(ex1));
  seg7_digit_decoder u_seg2 (.digit(digits[2]), .seg(ex2));
  seg7_digit_decoder u_seg3 (.digit(digits[1]), .seg(ex3));
  seg7_digit_decoder u_seg4 (.digit(digits[0]), .seg(ex4));

  seg7_status_decoder u_msg (
    .status   (status),
    .seg_left (ex5),
    .seg_right(ex6)
  );

endmodule
