// Run/stop control of the stopclock.
//
// The state bit RUN is updated only at the start of each 1/10 s interval,
// when the tick strobe s is high:
//   RUN <= not RESET and (SS xor RUN)
// so a reset in the interval just ended stops the clock, and otherwise an
// odd number of start/stop presses toggles it. RESET and SS come from the
// two button glue blocks and are valid in the cycle in which s is high. The
// gates (inverter, XOR, AND) and the enabled register follow the original
// design; the register is low after the global reset, which is what keeps
// the first tick from starting the clock on its own.
//
// Ports: clk, rst (synchronous, active high), s, reset_i (RESET),
// ss_i (SS), run (RUN).
// Timing: RUN changes on the clock edge that ends the cycle in which s is
// high; the datapath sees the new value at the following tick.
module control (
  input  logic clk,
  input  logic rst,
  input  logic s,
  input  logic reset_i,
  input  logic ss_i,
  output logic run
);

  logic reset_bar;
  logic toggle;
  logic next_run;

  assign reset_bar = ~reset_i;
  assign toggle    = ss_i ^ run;
  assign next_run  = reset_bar & toggle;

  latch_en u_state (.clk, .rst, .x(next_run), .c(s), .z(run));

endmodule
