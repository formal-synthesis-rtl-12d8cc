// Self-checking testbench for decoder. The expected picture of each digit is
// written as the list of its lit segments (0 top, 1 upper right, 2 lower
// right, 3 bottom, 4 lower left, 5 upper left, 6 middle) and turned into a
// pattern here; every 4-bit input is applied, words 10..15 must be blank.
module tb_decoder;
  logic [3:0] inp;
  logic [6:0] out;
  int checks = 0, failures = 0;

  decoder dut (.inp, .out);

  function automatic logic [6:0] lit(string segs);
    logic [6:0] p = '0;
    for (int k = 0; k < segs.len(); k++) p[segs[k] - "0"] = 1'b1;
    return p;
  endfunction

  string picture [10] = '{"012345", "12", "01346", "01236", "1256",
                          "02356", "023456", "012", "0123456", "012356"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] expected;
      inp = 4'(v);
      #1;
      expected = (v < 10) ? lit(picture[v]) : 7'b0;
      checks++;
      if (out !== expected) begin
        failures++;
        $display("input %0d: segments %b expected %b", v, out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
