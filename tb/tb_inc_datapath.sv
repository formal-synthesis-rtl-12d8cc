// Self-checking testbench for inc_datapath. A one-cycle strobe s every
// PERIOD cycles stands for the tick; RUN and RESET change only in the cycle
// of a strobe, as the control and the reset glue guarantee. The expected
// display follows the user-level rule at each strobe:
//   display <= RESET ? 00.0 : RUN ? next(display) : display
// and the digits and decoded segments must show it from the fourth cycle
// after the strobe to the next strobe. The tens carry must pulse exactly on
// the third cycle after a wrap from 59.9 to 00.0.
module tb_inc_datapath;
  localparam int PERIOD = 8;
  localparam int KD = 4;
  logic clk = 1'b0, rst = 1'b1, reset_i = 1'b0, run_i = 1'b0, s = 1'b0;
  logic [6:0] seg_tens, seg_secs, seg_tenths;
  logic [3:0] digit_tens, digit_secs, digit_tenths;
  logic carry_tens;
  int checks = 0, failures = 0, wraps = 0, clears = 0, holds = 0, settle_max = 0;
  int model = 0, k = KD;
  bit wrapped = 0;

  `include "stopclock_digits.svh"

  inc_datapath dut (.*);

  function automatic int as_hex(int v);
    return 256 * (v / 100) + 16 * ((v / 10) % 10) + v % 10;
  endfunction

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000 * PERIOD; n++) begin
      int shown;
      // Outputs of this cycle, k cycles after the latest strobe.
      // Digit by digit, so that a digit passing through 10 cannot look like a carry.
      shown = 256 * int'(digit_tens) + 16 * int'(digit_secs) + int'(digit_tenths);
      if (k >= KD) begin
        checks++;
        if (shown != as_hex(model)) begin failures++; $display("cycle %0d: digits %h expected %0d", n, shown, model); end
        checks++;
        if (seg_to_digit(seg_tens) * 100 + seg_to_digit(seg_secs) * 10 + seg_to_digit(seg_tenths) != model
            || seg_to_digit(seg_tens) < 0 || seg_to_digit(seg_secs) < 0 || seg_to_digit(seg_tenths) < 0) begin
          failures++; $display("cycle %0d: segments do not show %0d", n, model);
        end
      end else if (shown != as_hex(model) && k + 1 > settle_max) settle_max = k + 1;
      checks++;
      if (carry_tens !== (wrapped && k == 3)) begin failures++; $display("cycle %0d: carry_tens=%b", n, carry_tens); end
      // Inputs of this cycle.
      s = (n % PERIOD) == 0;
      if (s) begin
        reset_i = n > 700 * PERIOD && ($urandom % 600) == 0;
        run_i   = ($urandom % 10) != 0;
        wrapped = 0;
        if (reset_i) begin clears++; model = 0; end
        else if (run_i) begin
          if (model == 599) begin wraps++; wrapped = 1; end
          model = next_time(model);
        end else holds++;
        k = 0;
      end else begin
        reset_i = 1'($urandom);  // ignored away from the strobe
        run_i   = 1'($urandom);
      end
      @(negedge clk);
      k++;
    end
    checks++;
    if (wraps < 1 || clears < 2 || holds < 20) begin failures++; $display("poor coverage"); end
    checks++;
    if (settle_max != KD) begin failures++; $display("settling took %0d cycles, expected %0d", settle_max, KD); end
    $display("wraps=%0d clears=%0d holds=%0d settle=%0d", wraps, clears, holds, settle_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
