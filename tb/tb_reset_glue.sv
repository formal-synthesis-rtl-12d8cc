// Self-checking testbench for reset_glue. The strobe s is raised every
// PERIOD cycles; the reset button gets random pulses. At every strobe the
// output must say whether the button was high in any cycle of the interval
// that the strobe ends (from the previous strobe's cycle up to the cycle
// before this one). Apart from the cycle right after a strobe, where a new
// interval starts, the output must never fall.
module tb_reset_glue;
  localparam int PERIOD = 12;
  logic clk = 1'b0, rst = 1'b1, s = 1'b0, reset_button = 1'b0, reset_o;
  logic seen = 1'b0;
  logic prev_out = 1'b0;
  logic prev_s = 1'b0;
  int checks = 0, failures = 0, hi_intervals = 0, lo_intervals = 0;

  reset_glue dut (.clk, .rst, .s, .reset_button, .reset_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < PERIOD * 400; cyc++) begin
      s = (cyc % PERIOD) == 0;
      // Mostly quiet intervals, some with short or long presses.
      reset_button = (($urandom % 40) == 0) || (((cyc / PERIOD) % 7 == 3) && (cyc % PERIOD) == PERIOD - 1);
      #1;
      if (s) begin
        checks++;
        if (reset_o !== seen) begin
          failures++;
          $display("cycle %0d: RESET=%b, button seen in interval=%b", cyc, reset_o, seen);
        end
        if (seen) hi_intervals++; else lo_intervals++;
        seen = 1'b0;
      end else begin
        checks++;
        if (!prev_s && prev_out && !reset_o) begin failures++; $display("cycle %0d: RESET fell between strobes", cyc); end
      end
      prev_out = reset_o;
      prev_s = s;
      seen = seen | reset_button;
      @(negedge clk);
    end
    checks++;
    if (hi_intervals < 20 || lo_intervals < 20) begin failures++; $display("poor coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
