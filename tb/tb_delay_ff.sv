// Self-checking testbench for delay_ff: drives a random bit stream and checks
// that the output is low in reset and, afterwards, equals the input applied
// in the previous clock cycle.
module tb_delay_ff;
  logic clk = 1'b0, rst = 1'b1, x = 1'b1, z;
  logic expected;
  int checks = 0, failures = 0;

  delay_ff dut (.clk, .rst, .x, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (z !== 1'b0) begin failures++; $display("z not low in reset"); end
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      x = 1'($urandom);
      expected = x;
      @(negedge clk);
      checks++;
      if (z !== expected) begin
        failures++;
        $display("cycle %0d: z=%b expected %b", i, z, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
