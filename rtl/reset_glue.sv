// Reset-button glue: turns a reset button press of any length, at any time
// within a 1/10 s interval, into a RESET level that is valid when the next
// tick rises.
//
// RESET(t+1) = resetButton(t) or (not s(t) and RESET(t)), RESET(0) = lo:
// an OR gate, an AND gate with an inverted s input and a unit delay, as in
// the original design. The strobe s starts a new interval, so at the cycle in
// which s is high RESET holds the OR of the button over every cycle of the
// interval just ended, including the cycle in which that interval began. That
// is the value the control and the datapath act on in that cycle.
//
// Ports: clk, rst (synchronous, active high), s (rise of tick),
// reset_button (button level), reset_o (RESET).
// Timing: one flip-flop; a press is seen at the first rise of tick after it.
module reset_glue (
  input  logic clk,
  input  logic rst,
  input  logic s,
  input  logic reset_button,
  output logic reset_o
);

  logic next_reset;

  assign next_reset = reset_button | (~s & reset_o);

  delay_ff u_delay (.clk, .rst, .x(next_reset), .z(reset_o));

endmodule
