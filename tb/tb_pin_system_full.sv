// tb_pin_system_full: the PIN input system at its built-in settings
// (50 MHz clock, 30-second entry window, PINs 2024 and 2023).
//
// One complete user session: the start screen "0000 EI", entry of a wrong
// digit ("FA"), entry of PIN1 2024 digit by digit (LEDs on, dashes), then
// the clock runs until the seconds counter has reached 1 and the testbench
// checks that this took exactly 50,000,000 cycles. With the default
// 30-second window, the lockout itself (31 seconds, 1.55e9 cycles) is
// left to the short-time-base end-to-end test.
module tb_pin_system_full;
  import pin_pkg::*;

  logic          clk = 1;
  logic          n_rst = 1;
  logic [9:0]    sw = '0;
  logic          key0 = 1, key1 = 1;
  pin_t          pin_value;
  digit_t        digits [NUM_DIGITS];
  logic [3:0]    status;
  logic [31:0]   seconds;
  logic          second_tick, entry_open;
  seg7_t         ex1, ex2, ex3, ex4, ex5, ex6;
  logic [9:0]    led;
  int checks = 0, failures = 0;
  longint cycles = 0;

  pin_system_top dut (
    .clk(clk), .n_rst(n_rst), .sw(sw), .key0(key0), .key1(key1),
    .pin_value(pin_value), .digits(digits), .status(status), .seconds(seconds),
    .second_tick(second_tick), .entry_open(entry_open),
    .ex1(ex1), .ex2(ex2), .ex3(ex3), .ex4(ex4), .ex5(ex5), .ex6(ex6), .led(led));

  always #10 clk = ~clk;   // 50 MHz: 20 ns period
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL t=%0t %s = %0h expected %0h", $time, what, got, expv);
    end
  endtask

  // key pattern {key1,key0} per slot, from the entry table
  task automatic enter(input logic [1:0] k1k0, input int d);
    @(negedge clk);
    {key1, key0} = k1k0;
    sw = 10'(1 << d);
    @(negedge clk);
    sw = '0;
    {key1, key0} = 2'b11;
  endtask

  initial begin
    #1;
    expect_eq("start pin", pin_value, 0);
    expect_eq("start ex1", ex1, 8'hC0);
    expect_eq("start ex4", ex4, 8'hC0);
    expect_eq("start ex5 E", ex5, 8'h86);
    expect_eq("start ex6 I", ex6, 8'hCF);
    expect_eq("start led", led, 0);
    enter(2'b11, 7);                        // first digit 7 -> 0007, FA
    expect_eq("wrong pin", pin_value, 7);
    expect_eq("FA ex5", ex5, 8'h8E);
    expect_eq("FA ex6", ex6, 8'h88);
    expect_eq("FA led", led, 0);
    enter(2'b11, 4);                        // first digit (units)
    enter(2'b10, 2);                        // second digit
    enter(2'b01, 0);                        // third digit
    enter(2'b00, 2);                        // fourth digit
    expect_eq("pin", pin_value, 2024);
    expect_eq("ex1", ex1, 8'hA4);
    expect_eq("ex2", ex2, 8'hC0);
    expect_eq("ex3", ex3, 8'hA4);
    expect_eq("ex4", ex4, 8'h99);
    expect_eq("ex5 dash", ex5, 8'hBF);
    expect_eq("ex6 dash", ex6, 8'hBF);
    expect_eq("led", led, 10'h3FF);
    expect_eq("open", entry_open, 1);
    expect_eq("seconds", seconds, 0);
    wait (seconds == 1);
    expect_eq("cycles per second", cycles, 50_000_000);
    expect_eq("still correct", led, 10'h3FF);
    expect_eq("still open", entry_open, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
