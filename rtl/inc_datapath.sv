// Stopclock datapath: three cascaded digit counters with their decoders.
//
// At the cycle in which the tick strobe s is high, the datapath clears all
// digits if RESET is high and otherwise, if RUN is high, adds one tenth:
//   clr = RESET and s,   inc = RUN and s.
// Gating both with s keeps every change of the counters aligned with the
// start of a 1/10 s interval. The tenths counter (0..9) carries into the
// seconds counter (0..9), which carries into the tens-of-seconds counter
// (0..5); the carry of the tens counter only clears that counter, so the
// clock wraps from 59.9 to 00.0. All three counters share the clear.
// Each carry comes one cycle after the increment that caused it, so after a
// tick the display is settled within 4 clock cycles (59.9 -> 00.0 is the
// worst case); in between, a counter that is passing through N+1 shows a
// blank digit for one cycle. The structure follows the original design.
//
// Ports: clk, rst (synchronous, active high), reset_i (RESET), run_i (RUN),
// s (rise of tick); seg_* the segment patterns, digit_* the binary digits,
// carry_tens the carry out of the tens counter (high for one cycle on wrap).
module inc_datapath
  import stopclock_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   reset_i,
  input  logic   run_i,
  input  logic   s,
  output seg7_t  seg_tens,
  output seg7_t  seg_secs,
  output seg7_t  seg_tenths,
  output word4_t digit_tens,
  output word4_t digit_secs,
  output word4_t digit_tenths,
  output logic   carry_tens
);

  logic clr, inc;
  logic carry_tenths, carry_secs;

  assign clr = reset_i & s;
  assign inc = run_i & s;

  next_n #(.N(TENTHS_MAX)) u_tenths (.clk, .rst, .clear(clr), .inc(inc),
                                     .carry(carry_tenths), .word(digit_tenths));
  next_n #(.N(SECS_MAX))   u_secs   (.clk, .rst, .clear(clr), .inc(carry_tenths),
                                     .carry(carry_secs), .word(digit_secs));
  next_n #(.N(TENS_MAX))   u_tens   (.clk, .rst, .clear(clr), .inc(carry_secs),
                                     .carry(carry_tens), .word(digit_tens));

  decoder u_dec_tenths (.inp(digit_tenths), .out(seg_tenths));
  decoder u_dec_secs   (.inp(digit_secs),   .out(seg_secs));
  decoder u_dec_tens   (.inp(digit_tens),   .out(seg_tens));

endmodule
