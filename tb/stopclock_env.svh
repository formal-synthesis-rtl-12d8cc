// Checking environment shared by the whole-design stopclock testbenches
// (included inside a module that defines the localparam P, the tick period
// in system clock cycles, and the localparam bit CHECK_ALL).
//
// The testbench drives the design one system clock cycle at a time with
// step(). A reference model of the user-level specification runs beside it:
// between two tick rises it records whether the reset button was high at any
// cycle and how many times the start/stop button rose; at each tick rise it
// updates the abstract state exactly as the specification does:
//   display <= reset ? 00.0 : run ? next(display) : display
//   run     <= reset ? stopped : odd presses ? not run : run
// The design's display (binary digits and decoded segments) must then equal
// the model from the KD-th cycle after the tick rise up to and including the
// cycle of the next rise; the run output must equal the model from the cycle
// after the rise on. With CHECK_ALL cleared, the display is compared only at
// the KD-th cycle and in the cycle of the next rise, which keeps very long
// runs fast.

localparam longint PL = longint'(P);
localparam longint HALF = PL / 2;
localparam longint KD = 4;  // cycles after a tick rise before the display is valid

logic       clk = 1'b0, rst = 1'b1;
logic       tick = 1'b0, reset_button = 1'b0, stst_button = 1'b0;
logic [6:0] seg_tens, seg_secs, seg_tenths;
logic [3:0] digit_tens, digit_secs, digit_tenths;
logic       run, carry_out;

stopclock dut (.*);

always #500 clk = ~clk;  // 1 MHz in a 1 ns time unit

int  checks = 0, failures = 0;
longint cyc = 0;             // index of the cycle whose inputs are applied next
longint last_s = -1;         // index of the latest tick-rise cycle
logic   m_tick_prev = 1'b0, m_stst_prev = 1'b0, m_reset_prev = 1'b0;
logic   m_reset_seen = 1'b0;
int     m_presses = 0;
int     m_disp = 0;
logic   m_run = 1'b0;
bit     m_wrapped = 0;

// How often each mechanism of the design happened.
int n_ticks = 0, n_starts = 0, n_stops = 0, n_even_multi = 0, n_odd_multi = 0;
int n_reset_running = 0, n_reset_stopped = 0, n_reset_and_stst = 0;
int n_carry_secs = 0, n_carry_tens = 0, n_wrap = 0;
int n_span_reset = 0, n_span_stst = 0, n_transient = 0;

task automatic fail(string msg);
  failures++;
  if (failures <= 20) $display("cycle %0d: %s", cyc, msg);
endtask

task automatic check_outputs();
  longint k = (last_s < 0) ? KD : cyc - last_s;
  checks++;
  if (run !== m_run) fail($sformatf("run=%b expected %b", run, m_run));
  checks++;
  if (carry_out !== (m_wrapped && k == 3)) fail($sformatf("carry_out=%b at %0d cycles after the tick", carry_out, k));
  if (k >= KD && (CHECK_ALL || k == KD || cyc % PL == HALF)) begin
    checks++;
    if (int'(digit_tens) != m_disp / 100 || int'(digit_secs) != (m_disp / 10) % 10
        || int'(digit_tenths) != m_disp % 10)
      fail($sformatf("digits %0d:%0d:%0d expected %0d", digit_tens, digit_secs, digit_tenths, m_disp));
    checks++;
    if (seg_to_digit(seg_tens) != m_disp / 100 || seg_to_digit(seg_secs) != (m_disp / 10) % 10
        || seg_to_digit(seg_tenths) != m_disp % 10)
      fail($sformatf("segments %b %b %b do not show %0d", seg_tens, seg_secs, seg_tenths, m_disp));
  end else if (k < KD) begin
    if (seg_to_digit(seg_tens) < 0 || seg_to_digit(seg_secs) < 0 || seg_to_digit(seg_tenths) < 0)
      n_transient++;
  end
endtask

task automatic model_cycle();
  logic s = tick && !m_tick_prev;
  if (s) begin
    int old = m_disp;
    logic old_run = m_run;
    logic odd = (m_presses % 2) == 1;
    n_ticks++;
    if (m_reset_seen) begin
      if (old_run) n_reset_running++; else n_reset_stopped++;
      if (m_presses > 0) n_reset_and_stst++;
    end else if (odd) begin
      if (old_run) n_stops++; else n_starts++;
    end
    if (!odd && m_presses >= 2) n_even_multi++;
    if (odd && m_presses >= 3) n_odd_multi++;
    if (reset_button && m_reset_prev) n_span_reset++;
    if (stst_button && m_stst_prev) n_span_stst++;
    m_wrapped = 0;
    if (m_reset_seen) m_disp = 0;
    else if (old_run) begin
      m_disp = next_time(old);
      if (old % 10 == 9) n_carry_secs++;
      if (old % 100 == 99) n_carry_tens++;
      if (old == 599) begin n_wrap++; m_wrapped = 1; end
    end
    m_run = m_reset_seen ? 1'b0 : (odd ? !old_run : old_run);
    last_s = cyc;
    m_reset_seen = 1'b0;
    m_presses = 0;
  end
  m_reset_seen = m_reset_seen | reset_button;
  if (stst_button && !m_stst_prev) m_presses++;
  m_tick_prev = tick;
  m_stst_prev = stst_button;
  m_reset_prev = reset_button;
endtask

// One system clock cycle with the given button levels. The tick is high in
// the second half of each period, so it rises when cyc % P == P/2.
task automatic step(input logic rb, input logic sb);
  @(negedge clk);
  check_outputs();
  tick = (cyc % PL) >= HALF;
  reset_button = rb;
  stst_button = sb;
  model_cycle();
  cyc++;
endtask

task automatic idle(input longint n);
  for (longint i = 0; i < n; i++) step(1'b0, 1'b0);
endtask

// Steps until the next cycle to be driven is a tick-rise cycle.
task automatic align();
  while (cyc % PL != HALF) step(1'b0, 1'b0);
endtask

// One whole tick interval, starting at its tick-rise cycle: n_stst separate
// presses of the start/stop button (1 or 2 cycles each, at most (P-2)/4 of
// them) and, if do_reset, one press of the reset button of 1 to 3 cycles at
// a random place.
task automatic interval(input int n_stst, input bit do_reset);
  int rpos = int'(1 + $urandom % (P - 4));
  int rlen = int'(1 + $urandom % 3);
  logic sb [] = new [P];
  foreach (sb[i]) sb[i] = 1'b0;
  for (int j = 0; j < n_stst; j++) begin
    int at = 1 + 4 * j + int'($urandom % 2);
    sb[at] = 1'b1;
    if ($urandom % 2 == 1) sb[at + 1] = 1'b1;
  end
  for (int i = 0; i < P; i++)
    step(do_reset && i >= rpos && i < rpos + rlen, sb[i]);
endtask

// A press of one button held from two cycles before a tick rise to two
// cycles after it (which = 0: reset, 1: start/stop); starts aligned.
task automatic press_across(input bit which);
  for (int i = 0; i < P; i++)
    step(!which && i >= P - 2, which && i >= P - 2);
  step(!which, which);
  step(!which, which);
  for (int i = 2; i < P; i++) step(1'b0, 1'b0);
endtask

task automatic finish_report(input bit need_all);
  $display("ticks=%0d starts=%0d stops=%0d even_presses=%0d odd_multi_presses=%0d",
           n_ticks, n_starts, n_stops, n_even_multi, n_odd_multi);
  $display("resets running=%0d stopped=%0d with_stst=%0d carries secs=%0d tens=%0d wraps=%0d",
           n_reset_running, n_reset_stopped, n_reset_and_stst, n_carry_secs, n_carry_tens, n_wrap);
  $display("presses across a tick: reset=%0d stst=%0d; blank transient digits=%0d",
           n_span_reset, n_span_stst, n_transient);
  checks++;
  if (n_starts == 0 || n_stops == 0 || n_reset_running == 0 || n_carry_secs == 0
      || n_carry_tens == 0 || n_wrap == 0 || n_transient == 0) begin
    failures++;
    $display("a basic mechanism never happened");
  end
  if (need_all) begin
    checks++;
    if (n_even_multi == 0 || n_odd_multi == 0 || n_reset_stopped == 0 || n_reset_and_stst == 0
        || n_span_reset == 0 || n_span_stst == 0) begin
      failures++;
      $display("a button mechanism never happened");
    end
  end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
