// Rising-edge detector: z is high for the one cycle in which x is high and
// was low in the cycle before.
//
// Built as in the original design from a unit delay, an inverter and an AND
// gate: z = x and not(delayed x). Because the delay starts low, an input that
// is already high in the first cycle after reset counts as a rise there.
// In the stopclock it turns the 10 Hz tick into the one-cycle strobe s that
// marks the start of each 1/10 s interval, and it detects presses of the
// start/stop button.
//
// Ports: clk, rst (synchronous, active high), x (level in), z (rise strobe).
// Timing: z is combinational in x (same cycle), one register inside.
module rise_detect (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic z
);

  logic x_d;

  delay_ff u_delay (.clk, .rst, .x(x), .z(x_d));

  assign z = x & ~x_d;

endmodule
