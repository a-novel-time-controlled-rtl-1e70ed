// tb_second_timer: time base with CLK_HZ=5, TIME_LIMIT_S=3, SEC_W=3.
//
// The testbench counts clock edges since the last reset itself and checks,
// after every edge, that seconds = edges / CLK_HZ (saturating at 7), that
// second_tick is high exactly in the last cycle of each second and that
// window_open is high while seconds <= 3. It checks the power-up value,
// runs past saturation, and applies resets at arbitrary points of a second.
module tb_second_timer;
  localparam int unsigned HZ = 5, LIMIT = 3, W = 3;

  logic         clk = 0;
  logic         n_rst = 1;
  logic [W-1:0] seconds;
  logic         second_tick, window_open;
  int checks = 0, failures = 0;
  int edges = 0;            // rising edges with reset released since last reset
  int windows_closed = 0, saturated = 0, ticks_seen = 0;

  second_timer #(.CLK_HZ(HZ), .TIME_LIMIT_S(LIMIT), .SEC_W(W)) dut (
    .clk(clk), .n_rst(n_rst), .seconds(seconds),
    .second_tick(second_tick), .window_open(window_open));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int es;
    es = edges / HZ;
    if (es > 7) es = 7;
    checks++;
    if (int'(seconds) != es) begin
      failures++;
      $display("FAIL t=%0t edges=%0d seconds=%0d expected %0d", $time, edges, seconds, es);
    end
    checks++;
    if (second_tick !== (n_rst && (edges % HZ == HZ - 1))) begin
      failures++;
      $display("FAIL t=%0t edges=%0d second_tick=%b", $time, edges, second_tick);
    end
    checks++;
    if (window_open !== (es <= LIMIT)) begin
      failures++;
      $display("FAIL t=%0t seconds=%0d window_open=%b", $time, es, window_open);
    end
    if (!window_open) windows_closed++;
    if (es == 7) saturated++;
    if (second_tick) ticks_seen++;
  endtask

  task automatic step();
    @(posedge clk);
    if (!n_rst) edges = 0; else edges++;
    #1 check();
  endtask

  initial begin
    #1 check();                       // power-up value
    repeat (60) step();               // past the window and past saturation
    n_rst = 0; step(); n_rst = 1;     // reset after a long run
    repeat (7) step();                // into the second second
    n_rst = 0; step(); step(); n_rst = 1;
    repeat (23) step();
    for (int i = 0; i < 5; i++) begin // resets at random points
      repeat ($urandom_range(1, 12)) step();
      n_rst = 0; step(); n_rst = 1;
    end
    repeat (10) step();
    checks++;
    if (windows_closed == 0 || saturated == 0 || ticks_seen == 0) begin
      failures++;
      $display("FAIL coverage closed=%0d sat=%0d ticks=%0d", windows_closed, saturated, ticks_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
