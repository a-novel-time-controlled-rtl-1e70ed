// tb_pin_system_top: end-to-end test of the PIN input system with a short
// time base (CLK_HZ=10 cycles per second, TIME_LIMIT_S=5, so the entry
// window lasts 60 cycles) and the default PINs 2024 and 2023.
//
// A reference model in the testbench counts clock edges since the last
// reset, derives the seconds count and the window from it, keeps the four
// expected digits (loading them by the entry table: key0,key1 = 1,1 first
// digit ... 0,0 fourth digit) and derives the expected PIN, status, LEDs
// and all six display patterns. Every output is compared after every
// clock edge.
//
// Directed steps make each mechanism happen: the "EI" start screen, a
// wrong PIN ("FA"), PIN1 and PIN2 accepted, an invalid switch setting
// ignored, entry refused after the time runs out (lockout), the
// administrator reset refusing entry while held and then granting a new
// window with the digits kept. The test also checks that the last digit
// accepted before lockout is taken on edge (TIME_LIMIT_S+1)*CLK_HZ - 1.
module tb_pin_system_top;
  import pin_pkg::*;

  localparam int unsigned HZ = 10, LIMIT = 5;
  localparam int unsigned PIN1 = 2024, PIN2 = 2023;

  logic          clk = 1;   // first edge is a falling one
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

  // model state
  int edges = 0;
  int m_dig [4] = '{0, 0, 0, 0};

  // mechanism counters
  int n_enter_screen = 0, n_false = 0, n_pin1 = 0, n_pin2 = 0;
  int n_invalid_ignored = 0, n_locked_ignored = 0, n_reset_ignored = 0;
  int n_extra_time_entry = 0, n_loads = 0, n_back_to_enter = 0;
  int last_accept_edge = -1, first_reject_edge = -1;
  bit had_reset = 0, was_nonzero = 0;

  pin_system_top #(.CLK_HZ(HZ), .TIME_LIMIT_S(LIMIT), .PIN1(PIN1), .PIN2(PIN2)) dut (
    .clk(clk), .n_rst(n_rst), .sw(sw), .key0(key0), .key1(key1),
    .pin_value(pin_value), .digits(digits), .status(status), .seconds(seconds),
    .second_tick(second_tick), .entry_open(entry_open),
    .ex1(ex1), .ex2(ex2), .ex3(ex3), .ex4(ex4), .ex5(ex5), .ex6(ex6), .led(led));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] glyph(input string lit);
    logic [7:0] p = 8'hFF;
    for (int i = 0; i < lit.len(); i++) p[lit[i] - "a"] = 1'b0;
    return p;
  endfunction

  function automatic logic [7:0] digit_glyph(input int d);
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    return glyph(lit[d]);
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL t=%0t %s = %0h expected %0h", $time, what, got, expv);
    end
  endtask

  task automatic check();
    int secs, value;
    bit open_w, correct;
    logic [7:0] m5, m6;
    secs   = edges / HZ;
    open_w = (secs <= LIMIT);
    value  = m_dig[3] * 1000 + m_dig[2] * 100 + m_dig[1] * 10 + m_dig[0];
    correct = (value != 0) && (value == PIN1 || value == PIN2);
    expect_eq("seconds", seconds, secs);
    expect_eq("entry_open", entry_open, open_w);
    expect_eq("pin_value", pin_value, value);
    for (int i = 0; i < 4; i++) expect_eq($sformatf("digit%0d", i), digits[i], m_dig[i]);
    expect_eq("ex1", ex1, digit_glyph(m_dig[3]));
    expect_eq("ex2", ex2, digit_glyph(m_dig[2]));
    expect_eq("ex3", ex3, digit_glyph(m_dig[1]));
    expect_eq("ex4", ex4, digit_glyph(m_dig[0]));
    if (value == 0)  begin m5 = glyph("adefg"); m6 = glyph("ef");     end
    else if (correct) begin m5 = glyph("g");    m6 = glyph("g");      end
    else             begin m5 = glyph("aefg");  m6 = glyph("abcefg"); end
    expect_eq("ex5", ex5, m5);
    expect_eq("ex6", ex6, m6);
    expect_eq("led", led, correct ? 10'h3FF : 10'h000);
    if (value == 0) begin
      n_enter_screen++;
      if (was_nonzero) n_back_to_enter++;
    end else if (!correct) n_false++;
    else if (value == PIN1) n_pin1++;
    else n_pin2++;
    was_nonzero = (value != 0);
  endtask

  // One clock edge with the given inputs; updates the model.
  task automatic step(input bit rst_n, input logic [1:0] keys_k1k0, input logic [9:0] switches);
    int ones, idx, slot;
    bit open_w;
    @(negedge clk);
    n_rst = rst_n; key1 = keys_k1k0[1]; key0 = keys_k1k0[0]; sw = switches;
    ones = 0; idx = 0;
    for (int k = 0; k < 10; k++) if (switches[k]) begin ones++; idx = k; end
    // entry table: (key0,key1) = (1,1) first, (0,1) second, (1,0) third, (0,0) fourth
    case ({keys_k1k0[0], keys_k1k0[1]})
      2'b11: slot = 0;
      2'b01: slot = 1;
      2'b10: slot = 2;
      default: slot = 3;
    endcase
    open_w = ((edges / HZ) <= LIMIT);
    @(posedge clk);
    if (!rst_n) begin
      if (ones == 1) n_reset_ignored++;
      edges = 0;
      had_reset = 1;
    end else begin
      if (ones == 1 && open_w) begin
        if (m_dig[slot] != idx) n_loads++;
        m_dig[slot] = idx;
        last_accept_edge = edges;
        if (had_reset) n_extra_time_entry++;
      end else if (ones == 1 && !open_w) begin
        n_locked_ignored++;
        if (first_reject_edge < 0) first_reject_edge = edges;
      end else if (ones != 1 && open_w) n_invalid_ignored++;
      edges++;
    end
    #1 check();
  endtask

  // keys pattern {key1,key0} for a slot, from the entry table
  function automatic logic [1:0] keys_for(input int slot);
    case (slot)
      0: return 2'b11;
      1: return 2'b10;
      2: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  task automatic enter(input int slot, input int d);
    step(1, keys_for(slot), 10'(1 << d));
  endtask

  initial begin
    #1 check();                               // power-up: 0000 EI
    step(1, 2'b11, '0);                        // no switch on
    enter(0, 4);                               // 0004 -> FA
    step(1, keys_for(1), 10'b0000000101);      // two switches: ignored
    enter(1, 2); enter(2, 0); enter(3, 2);     // 2024 -> PIN1
    expect_eq("pin1 accepted", led, 10'h3FF);
    enter(0, 3);                               // 2023 -> PIN2
    expect_eq("pin2 accepted", led, 10'h3FF);
    enter(0, 5);                               // 2025 -> FA
    enter(0, 0); enter(1, 0); enter(3, 0);     // back to 0000 -> EI
    // random entries until the window has closed and beyond
    while (edges < (LIMIT + 1) * HZ + 8) begin
      int r = $urandom_range(0, 9);
      if (r < 8) enter($urandom_range(0, 3), $urandom_range(0, 9));
      else step(1, 2'($urandom), 10'($urandom));
    end
    expect_eq("last accepted edge", last_accept_edge, (LIMIT + 1) * HZ - 1);
    expect_eq("first refused edge", first_reject_edge, (LIMIT + 1) * HZ);
    // administrator reset: entry refused while held, digits kept
    step(0, keys_for(0), 10'(1 << 7));
    step(0, keys_for(1), 10'(1 << 8));
    // new window: enter PIN1 again
    enter(0, 4); enter(1, 2); enter(2, 0); enter(3, 2);
    expect_eq("pin1 after extra time", led, 10'h3FF);
    repeat (20) enter($urandom_range(0, 3), $urandom_range(0, 9));
    enter(0, 3); enter(1, 2); enter(2, 0); enter(3, 2);
    repeat (5) step(1, 2'b11, '0);

    $display("mechanisms: enter_screen=%0d false=%0d pin1=%0d pin2=%0d invalid_ignored=%0d",
             n_enter_screen, n_false, n_pin1, n_pin2, n_invalid_ignored);
    $display("            locked_ignored=%0d reset_ignored=%0d extra_time_entries=%0d back_to_enter=%0d loads=%0d",
             n_locked_ignored, n_reset_ignored, n_extra_time_entry, n_back_to_enter, n_loads);
    if (n_enter_screen == 0)     begin failures++; $display("FAIL mechanism EI screen never seen"); end
    if (n_false == 0)            begin failures++; $display("FAIL mechanism FA never seen"); end
    if (n_pin1 == 0)             begin failures++; $display("FAIL mechanism PIN1 never accepted"); end
    if (n_pin2 == 0)             begin failures++; $display("FAIL mechanism PIN2 never accepted"); end
    if (n_invalid_ignored == 0)  begin failures++; $display("FAIL mechanism invalid switches never ignored"); end
    if (n_locked_ignored == 0)   begin failures++; $display("FAIL mechanism lockout never happened"); end
    if (n_reset_ignored == 0)    begin failures++; $display("FAIL mechanism entry during reset never tried"); end
    if (n_extra_time_entry == 0) begin failures++; $display("FAIL mechanism extra time never used"); end
    if (n_back_to_enter == 0)    begin failures++; $display("FAIL mechanism return to EI never seen"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
