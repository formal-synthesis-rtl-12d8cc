// Self-checking testbench for rise_detect: a random level stream; the output
// must be high exactly in the cycles where the input is high and was low in
// the cycle before (the input counts as low before the first cycle).
module tb_rise_detect;
  logic clk = 1'b0, rst = 1'b1, x = 1'b0, z;
  logic last = 1'b0;
  int checks = 0, failures = 0, rises = 0;

  rise_detect dut (.clk, .rst, .x, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      x = ($urandom % 3) != 0;
      #1;
      checks++;
      if (z !== (x && !last)) begin
        failures++;
        $display("cycle %0d: x=%b previous=%b z=%b", i, x, last, z);
      end
      if (z) rises++;
      last = x;
      @(negedge clk);
    end
    checks++;
    if (rises < 100) begin failures++; $display("too few rises"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
