// tb_digit_entry: the four digit registers, one per slot, under random
// stimulus.
//
// Each slot is built with its own SLOT value. The button pattern of each
// slot is taken from the entry table (key0,key1): slot 0 = 1,1; slot 1 =
// 0,1; slot 2 = 1,0; slot 3 = 0,0. A register must load the switch digit
// exactly when reset is released, the window is open, its pattern is on
// the buttons and the switch digit is valid, and hold otherwise; reset
// must not clear it. Power-up value is 0.
module tb_digit_entry;
  import pin_pkg::*;

  logic   clk = 0;
  logic   n_rst = 1, window_open = 1, key0 = 1, key1 = 1, sw_valid = 0;
  digit_t sw_digit = '0;
  digit_t digit [4];
  digit_t model [4] = '{default: '0};
  int checks = 0, failures = 0;
  int loads = 0, held_reset = 0, held_window = 0, held_invalid = 0;

  localparam logic K0 [4] = '{1'b1, 1'b0, 1'b1, 1'b0};
  localparam logic K1 [4] = '{1'b1, 1'b1, 1'b0, 1'b0};

  for (genvar i = 0; i < 4; i++) begin : g_dut
    digit_entry #(.SLOT(i)) dut (
      .clk(clk), .n_rst(n_rst), .window_open(window_open),
      .key0(key0), .key1(key1), .sw_digit(sw_digit), .sw_valid(sw_valid),
      .digit(digit[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (digit[i] != model[i]) begin
        failures++;
        $display("FAIL t=%0t slot %0d digit=%0d expected %0d", $time, i, digit[i], model[i]);
      end
    end
  endtask

  initial begin
    #1 check();
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      n_rst       = ($urandom_range(0, 9) != 0);
      window_open = ($urandom_range(0, 5) != 0);
      key0        = 1'($urandom);
      key1        = 1'($urandom);
      sw_valid    = ($urandom_range(0, 4) != 0);
      sw_digit    = digit_t'($urandom_range(0, 9));
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        if (key0 == K0[i] && key1 == K1[i]) begin
          if (n_rst && window_open && sw_valid) begin
            if (model[i] != sw_digit) loads++;
            model[i] = sw_digit;
          end else if (!n_rst) held_reset++;
          else if (!window_open) held_window++;
          else held_invalid++;
        end
      end
      #1 check();
    end
    checks++;
    if (loads == 0 || held_reset == 0 || held_window == 0 || held_invalid == 0) begin
      failures++;
      $display("FAIL coverage loads=%0d reset=%0d window=%0d invalid=%0d", loads, held_reset, held_window, held_invalid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
