// Self-checking testbench for next_n, run for the two digit sizes of the
// stopclock (N = 9 and N = 5) side by side. Increments arrive as one-cycle
// pulses at least three cycles apart, as ticks do, with occasional clears.
// Checked against an abstract digit counting 0..N:
//   - after an increment the word shows the next digit one cycle later;
//   - after an increment from N the word shows N+1 with carry high for
//     exactly one cycle and then 0 with carry low (the one-cycle carry delay);
//   - a clear gives 0 with no carry; carry is low at every other time.
module tb_next_n;
  logic clk = 1'b0, rst = 1'b1;
  logic clear = 1'b0, inc = 1'b0;
  logic carry9, carry5;
  logic [3:0] word9, word5;
  int d9 = 0, d5 = 0;
  bit wrap9 = 0, wrap5 = 0;
  int checks = 0, failures = 0, carries9 = 0, carries5 = 0, clears = 0;

  next_n             dut9 (.clk, .rst, .clear, .inc, .carry(carry9), .word(word9));
  next_n #(.N(5))    dut5 (.clk, .rst, .clear, .inc, .carry(carry5), .word(word5));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(string tag, logic c9, int w9, logic c5, int w5);
    checks++;
    if (carry9 !== c9 || int'(word9) != w9) begin
      failures++;
      $display("%s N=9: word=%0d carry=%b expected word=%0d carry=%b", tag, word9, carry9, w9, c9);
    end
    checks++;
    if (carry5 !== c5 || int'(word5) != w5) begin
      failures++;
      $display("%s N=5: word=%0d carry=%b expected word=%0d carry=%b", tag, word5, carry5, w5, c5);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_state("after reset", 1'b0, 0, 1'b0, 0);
    for (int i = 0; i < 600; i++) begin
      // One event cycle: an increment, a clear or nothing.
      clear = ($urandom % 25) == 0;
      inc   = !clear && ($urandom % 5) != 0;
      wrap9 = 0; wrap5 = 0;
      if (clear) begin
        clears++;
        d9 = 0; d5 = 0;
      end else if (inc) begin
        if (d9 == 9) begin wrap9 = 1; carries9++; d9 = 0; end else d9++;
        if (d5 == 5) begin wrap5 = 1; carries5++; d5 = 0; end else d5++;
      end
      @(negedge clk);
      clear = 1'b0; inc = 1'b0;
      expect_state("first cycle", wrap9, wrap9 ? 10 : d9, wrap5, wrap5 ? 6 : d5);
      @(negedge clk);
      expect_state("second cycle", 1'b0, d9, 1'b0, d5);
      @(negedge clk);
      expect_state("third cycle", 1'b0, d9, 1'b0, d5);
    end
    checks++;
    if (carries9 < 10 || carries5 < 20 || clears < 5) begin failures++; $display("poor coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
