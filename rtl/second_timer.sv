// second_timer: one-second time base and entry-window flag.
//
// A tick counter counts clock periods from 0 to CLK_HZ-1; when it wraps,
// the seconds counter advances by one. Both are cleared by the synchronous,
// active-low reset n_rst, which in the full system is the administrator's
// button: pressing it restarts the user's time. The seconds counter
// saturates at its maximum instead of wrapping, so a locked system can not
// unlock itself after 2^SEC_W seconds (a choice of this design; the
// reference counter is a plain integer).
//
// window_open is 1 while seconds <= TIME_LIMIT_S, i.e. for the first
// TIME_LIMIT_S+1 seconds after reset: that is when digits may be entered.
// second_tick is a one-cycle pulse in the cycle the seconds counter
// advances.
//
// Timing: seconds changes on the clock edge after the tick counter has
// shown CLK_HZ-1, i.e. every CLK_HZ cycles. Both counters start at zero at
// configuration (declaration initialisers), so time runs from power-up.
module second_timer #(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned TIME_LIMIT_S = 30,
  parameter int unsigned SEC_W        = 32
) (
  input  logic             clk,
  input  logic             n_rst,
  output logic [SEC_W-1:0] seconds,
  output logic             second_tick,
  output logic             window_open
);

  localparam int unsigned TICK_W = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;
  localparam logic [TICK_W-1:0] TICK_LAST = TICK_W'(CLK_HZ - 1);

  logic [TICK_W-1:0] ticks = '0;
  logic [SEC_W-1:0]  secs  = '0;

  assign second_tick = n_rst && (ticks == TICK_LAST);

  always_ff @(posedge clk) begin
    if (!n_rst) begin
      ticks <= '0;
      secs  <= '0;
    end else if (ticks == TICK_LAST) begin
      ticks <= '0;
      if (secs != '1) secs <= secs + 1'b1;
    end else begin
      ticks <= ticks + 1'b1;
    end
  end

  assign seconds     = secs;
  assign window_open = (secs <= SEC_W'(TIME_LIMIT_S));

endmodule
