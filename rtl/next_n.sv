// One digit of the stopclock: a counter 0..N with a carry out.
//
// Built as in the original design from an incrementer/register, an equality
// comparator and an OR gate. The comparator raises carry while the word
// equals N+1; carry both feeds the next digit's increment input and, through
// the OR gate with the external clear, clears this word on the next edge.
// So after N the word passes through N+1 for exactly one clock cycle, in
// which carry is high, and then returns to 0. That cycle is invisible to
// the eye: the display is only required to be right a few cycles after each
// tick. The carry is thus one cycle later than the increment that caused it,
// and a chain of digits settles one cycle per digit.
//
// Ports: clk, rst (synchronous, active high), clear, inc, carry, word.
// Parameter: N, the largest digit value (9 for tenths and seconds, 5 for
// tens of seconds). N+1 must fit the 4-bit word.
// Timing: word changes on the rising clock edge; carry is combinational
// from word.
module next_n
  import stopclock_pkg::*;
#(
  parameter int unsigned N = 9
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   clear,
  input  logic   inc,
  output logic   carry,
  output word4_t word
);

  logic wrap_clear;

  assign carry      = (word == word4_t'(N + 1));
  assign wrap_clear = clear | carry;

  incr #(.WIDTH(4)) u_incr (.clk, .rst, .inc(inc), .clr(wrap_clear), .out(word));

  // The word never goes beyond N+1, and N+1 lasts a single cycle.
  initial assert (N + 1 < 16) else $error("next_n: N+1 must fit in 4 bits");
  a_range: assert property (@(posedge clk) disable iff (rst) word <= word4_t'(N + 1));
  a_wrap:  assert property (@(posedge clk) disable iff (rst) carry |=> word == '0);

endmodule
