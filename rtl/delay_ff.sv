// Unit delay: z follows x one clock later and is low after reset.
//
// This is the DELAY primitive of the stopclock: z(0) = lo and
// z(t+1) = x(t), counting t in system clock cycles. The global reset input
// realises the "implicit reset" that gives the output its initial low
// value; making it synchronous and active high is this design's choice.
//
// Ports: clk, rst (synchronous, active high), x (data in), z (data out).
// Timing: one flip-flop, z changes on the rising edge of clk.
module delay_ff (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic z
);

  always_ff @(posedge clk) begin
    if (rst) z <= 1'b0;
    else     z <= x;
  end

endmodule
