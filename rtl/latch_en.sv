// Enabled register (the LATCH primitive of the stopclock).
//
// z is low after reset; on each clock edge it loads x when the control
// input c is high and keeps its value otherwise: z(t+1) = c(t) ? x(t) : z(t).
// Clocked by the fast system clock and enabled by the one-cycle rise of the
// slow tick, it behaves as a unit delay of the slow time scale. Despite the
// name it is an edge-triggered flip-flop with an enable, not a level-sensitive
// latch, as in the original design.
//
// Ports: clk, rst (synchronous, active high), x (data), c (load enable),
// z (stored value). Timing: z changes on the rising clk edge after c is high.
module latch_en (
  input  logic clk,
  input  logic rst,
  input  logic x,
  input  logic c,
  output logic z
);

  always_ff @(posedge clk) begin
    if (rst)    z <= 1'b0;
    else if (c) z <= x;
  end

endmodule
