// Start/stop-button glue: keeps the parity of the number of presses (rises)
// of the start/stop button within the current 1/10 s interval.
//
// SS(t+1) = rise(t) xor (not s(t) and SS(t)), SS(0) = lo, where rise is the
// rising edge of the button: at the start of an interval (s high) the count
// restarts from the rise in that cycle alone, otherwise each rise toggles SS.
// At the cycle in which s is high, SS is therefore high exactly when the
// button rose an odd number of times during the interval just ended, so an
// even number of presses leaves the clock running or stopped as it was.
// This equation is the one of the original design's text; its gate drawing
// places the inversion differently, which would not give this equation, and
// the text is followed.
//
// Ports: clk, rst (synchronous, active high), s (rise of tick),
// stst_button (button level), ss_o (SS).
// Timing: two flip-flops (edge detector and parity).
module stst_glue (
  input  logic clk,
  input  logic rst,
  input  logic s,
  input  logic stst_button,
  output logic ss_o
);

  logic press;
  logic next_ss;

  rise_detect u_rise (.clk, .rst, .x(stst_button), .z(press));

  assign next_ss = press ^ (~s & ss_o);

  delay_ff u_delay (.clk, .rst, .x(next_ss), .z(ss_o));

endmodule
