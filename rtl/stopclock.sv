// Stopclock: a three-digit stopwatch (tens of seconds, seconds, tenths) with
// a reset button and a start/stop button, clocked by a fast system clock
// (1 MHz) and paced by a slow tick (10 Hz) that is synchronous to it.
//
// Every change of the user-visible state happens at a rise of the tick. A
// rising-edge detector turns the tick into a one-cycle strobe s. Between two
// strobes the reset glue remembers whether the reset button was pressed at
// all, and the start/stop glue counts the button's presses modulo 2. At the
// next strobe:
//   - the datapath clears the display if reset was pressed, and otherwise
//     adds one tenth if the clock is running;
//   - the control updates RUN to not RESET and (SS xor RUN).
// A press during interval k therefore affects RUN from interval k+1 and the
// displayed count from interval k+2 on, and a press of any length, at any
// cycle, is never lost. After each strobe the display needs at most 4 system
// cycles to settle (digits ripple one cycle per digit) and then holds for
// the rest of the 1/10 s interval.
//
// Ports: clk (system clock), rst (synchronous global reset, active high;
// the buttons must be released and no start/stop press may occur before the
// first tick rise after it), tick, reset_button, stst_button (levels,
// synchronous to clk), seg_* (segment patterns, bit i = segment i),
// digit_* (binary digits), run (RUN state), carry_out (carry of the tens
// digit: high for one cycle when the count wraps from 59.9 to 00.0; the
// original design leaves this wire unconnected).
// The partitioning and all gate-level equations follow the original design;
// the synchronous global reset and the blank pattern for non-digits are this
// design's choices.
module stopclock
  import stopclock_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   tick,
  input  logic   reset_button,
  input  logic   stst_button,
  output seg7_t  seg_tens,
  output seg7_t  seg_secs,
  output seg7_t  seg_tenths,
  output word4_t digit_tens,
  output word4_t digit_secs,
  output word4_t digit_tenths,
  output logic   run,
  output logic   carry_out
);

  logic s;
  logic reset_l;
  logic ss_l;

  rise_detect u_tick_rise (.clk, .rst, .x(tick), .z(s));

  reset_glue u_reset_glue (.clk, .rst, .s, .reset_button, .reset_o(reset_l));
  stst_glue  u_stst_glue  (.clk, .rst, .s, .stst_button,  .ss_o(ss_l));

  control u_control (.clk, .rst, .s, .reset_i(reset_l), .ss_i(ss_l), .run);

  inc_datapath u_datapath (
    .clk, .rst,
    .reset_i(reset_l), .run_i(run), .s,
    .seg_tens, .seg_secs, .seg_tenths,
    .digit_tens, .digit_secs, .digit_tenths,
    .carry_tens(carry_out)
  );

endmodule
