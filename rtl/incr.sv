// Incrementer/register (the INCR primitive of the stopclock).
//
// A WIDTH-bit register that adds one, modulo 2**WIDTH, on a clock edge when
// inc is high, loads zero when clr is high, and holds otherwise. It is zero
// after the global reset. The original design leaves the result open when
// inc and clr are high together; here clr wins, so a reset at a tick
// always clears the digit even while the clock runs.
//
// Ports: clk, rst (synchronous, active high), inc, clr, out.
// Parameter: WIDTH, 4 as in the original design.
// Timing: out changes on the rising clock edge.
module incr #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,
  input  logic             clr,
  output logic [WIDTH-1:0] out
);

  always_ff @(posedge clk) begin
    if (rst)      out <= '0;
    else if (clr) out <= '0;
    else if (inc) out <= out + 1'b1;
  end

endmodule
