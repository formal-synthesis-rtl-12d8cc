// Self-checking testbench for control. RESET and SS are random; s is raised
// every PERIOD cycles. The run state must change only after a strobe, and
// then to: stopped if RESET, otherwise toggled if SS, otherwise unchanged.
module tb_control;
  localparam int PERIOD = 5;
  logic clk = 1'b0, rst = 1'b1, s = 1'b0, reset_i = 1'b0, ss_i = 1'b0, run;
  logic model_run = 1'b0;
  int checks = 0, failures = 0, starts = 0, stops = 0, resets = 0;

  control dut (.clk, .rst, .s, .reset_i, .ss_i, .run);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (run !== 1'b0) begin failures++; $display("run not low after reset"); end
    rst = 1'b0;
    for (int cyc = 0; cyc < PERIOD * 1000; cyc++) begin
      s       = (cyc % PERIOD) == 0;
      reset_i = ($urandom % 6) == 0;
      ss_i    = ($urandom % 3) == 0;
      if (s) begin
        if (reset_i) begin
          if (model_run) resets++;
          model_run = 1'b0;
        end else if (ss_i) begin
          if (model_run) stops++; else starts++;
          model_run = !model_run;
        end
      end
      @(negedge clk);
      checks++;
      if (run !== model_run) begin
        failures++;
        $display("cycle %0d: run=%b expected %b", cyc, run, model_run);
      end
    end
    checks++;
    if (starts < 20 || stops < 20 || resets < 20) begin failures++; $display("poor coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
