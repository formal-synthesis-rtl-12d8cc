// Self-checking testbench for stst_glue. The strobe s is raised every PERIOD
// cycles; the start/stop button is driven with random levels. At every strobe
// the output must equal the parity of the number of rises of the button in
// the interval the strobe ends (from the previous strobe's cycle up to the
// cycle before this one), a rise being a cycle in which the button is high
// after a low cycle.
module tb_stst_glue;
  localparam int PERIOD = 16;
  logic clk = 1'b0, rst = 1'b1, s = 1'b0, stst_button = 1'b0, ss_o;
  logic last_button = 1'b0;
  int presses = 0;
  int checks = 0, failures = 0, odd_n = 0, even_multi = 0;

  stst_glue dut (.clk, .rst, .s, .stst_button, .ss_o);

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
    for (int cyc = 0; cyc < PERIOD * 500; cyc++) begin
      s = (cyc % PERIOD) == 0;
      stst_button = ($urandom % 3) == 0;
      #1;
      if (s) begin
        checks++;
        if (ss_o !== 1'(presses % 2)) begin
          failures++;
          $display("cycle %0d: SS=%b after %0d presses", cyc, ss_o, presses);
        end
        if (presses % 2 == 1) odd_n++;
        else if (presses >= 2) even_multi++;
        presses = 0;
      end
      if (stst_button && !last_button) presses++;
      last_button = stst_button;
      @(negedge clk);
    end
    checks++;
    if (odd_n < 20 || even_multi < 20) begin failures++; $display("poor coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
