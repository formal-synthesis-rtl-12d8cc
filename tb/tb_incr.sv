// Self-checking testbench for incr at its default width of 4 bits. Random
// increment and clear inputs; the output must count modulo 16, go to zero on
// clear (clear winning over increment) and hold otherwise.
module tb_incr;
  logic clk = 1'b0, rst = 1'b1, inc = 1'b0, clr = 1'b0;
  logic [3:0] out;
  int model = 0;
  int checks = 0, failures = 0, wraps = 0, both = 0;

  incr dut (.clk, .rst, .inc, .clr, .out);

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
    if (out !== 4'd0) begin failures++; $display("not zero after reset"); end
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      inc = ($urandom % 3) != 0;
      clr = ($urandom % 40) == 0;
      if (clr) begin
        if (inc) both++;
        model = 0;
      end else if (inc) begin
        if (model == 15) wraps++;
        model = (model + 1) % 16;
      end
      @(negedge clk);
      checks++;
      if (int'(out) != model) begin
        failures++;
        $display("step %0d: out=%0d expected %0d", i, out, model);
      end
    end
    checks++;
    if (wraps < 10 || both < 10) begin failures++; $display("poor coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
