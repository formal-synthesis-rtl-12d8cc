// Self-checking testbench for latch_en: random data and enable; the output
// must be low in reset, take the data of a cycle whose enable is high, and
// otherwise keep its value.
module tb_latch_en;
  logic clk = 1'b0, rst = 1'b1, x = 1'b1, c = 1'b1, z;
  logic held = 1'b0;
  int checks = 0, failures = 0, loads = 0;

  latch_en dut (.clk, .rst, .x, .c, .z);

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
    for (int i = 0; i < 2000; i++) begin
      x = 1'($urandom);
      c = ($urandom % 4) == 0;
      if (c) begin held = x; loads++; end
      @(negedge clk);
      checks++;
      if (z !== held) begin
        failures++;
        $display("cycle %0d: z=%b expected %b", i, z, held);
      end
    end
    checks++;
    if (loads < 100) begin failures++; $display("too few loads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
