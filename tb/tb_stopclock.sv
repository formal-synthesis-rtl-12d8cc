// End-to-end testbench of the stopclock with a short tick period (20 system
// cycles instead of 100000) so that many minutes of use fit in a short run.
// A scripted sequence takes the clock through start, even and odd numbers of
// start/stop presses in one interval, stop, a run past 59.9 s (wrap to
// 00.0), reset while running and while stopped, reset together with
// start/stop, and presses held across a tick rise; then thousands of
// intervals of random button use follow. Every cycle is compared with a
// reference model of the user-level specification (see stopclock_env.svh),
// and each mechanism must have happened at least once.
module tb_stopclock;
  localparam int P = 20;
  localparam bit CHECK_ALL = 1'b1;

  `include "stopclock_digits.svh"
  `include "stopclock_env.svh"

  initial begin
    #(64'd1000 * 64'd400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    align();
    repeat (3) interval(0, 0);
    interval(1, 0);                  // start
    repeat (5) interval(0, 0);
    repeat (3) interval(2, 0);       // even number of presses: keeps running
    interval(3, 0);                  // odd number: stop
    repeat (3) interval(0, 0);
    interval(1, 0);                  // start again
    repeat (620) interval(0, 0);     // past 59.9 s
    interval(0, 1);                  // reset while running
    repeat (2) interval(0, 0);
    interval(0, 1);                  // reset while stopped
    interval(1, 1);                  // reset and start/stop together
    interval(1, 0);
    repeat (30) interval(0, 0);
    press_across(1'b1);              // start/stop held across a tick
    repeat (5) interval(0, 0);
    press_across(1'b0);              // reset held across a tick
    repeat (5) interval(0, 0);
    for (int i = 0; i < 3000; i++) begin
      int unsigned r;
      r = $urandom % 100;
      interval(r < 8 ? int'(1 + $urandom % 4) : 0, r >= 97);
    end
    finish_report(1'b1);
  end
endmodule
