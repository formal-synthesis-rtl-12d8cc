// Full-size testbench of the stopclock: the real timing of a 1 MHz system
// clock and a 10 Hz tick (100000 cycles per tick), with the design at its
// default configuration. The clock is started, run for a complete minute
// until it wraps from 59.9 s to 00.0 s and on, stopped with three presses in
// one interval, reset while stopped, restarted and reset while running.
// Against the user-level reference model (stopclock_env.svh), run is
// compared in every cycle and the display four cycles after each tick and
// in the cycle of the next tick.
module tb_stopclock_full;
  localparam int P = 100000;
  localparam bit CHECK_ALL = 1'b0;

  `include "stopclock_digits.svh"
  `include "stopclock_env.svh"

  initial begin
    #(64'd1000 * 64'd80000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    align();
    interval(0, 0);
    interval(1, 0);                  // start
    repeat (605) interval(0, 0);     // one full minute and a little more
    interval(3, 0);                  // stop
    repeat (2) interval(0, 0);
    interval(0, 1);                  // reset while stopped
    interval(1, 0);                  // start
    repeat (15) interval(0, 0);
    interval(0, 1);                  // reset while running
    repeat (2) interval(0, 0);
    finish_report(1'b0);
  end
endmodule
