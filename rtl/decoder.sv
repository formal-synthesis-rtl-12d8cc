// Binary-to-seven-segment decoder.
//
// Maps a 4-bit binary digit (0..9) to the segment pattern that shows it,
// with bit i of the output driving segment i (0 top, 1 upper right,
// 2 lower right, 3 bottom, 4 lower left, 5 upper left, 6 middle; 1 = lit).
// The original design gives the segment numbering and the patterns of 0, 1,
// 2, 8 and 9 and leaves the rest as the usual ones; it also leaves open what
// a word of 10..15 shows. Here those words blank the digit, which hides the
// one-cycle N+1 state of a digit counter.
//
// Ports: inp (binary digit), out (segment pattern). Purely combinational.
module decoder
  import stopclock_pkg::*;
(
  input  word4_t inp,
  output seg7_t  out
);

  always_comb begin
    unique case (inp)
      4'd0:    out = 7'b011_1111;
      4'd1:    out = 7'b000_0110;
      4'd2:    out = 7'b101_1011;
      4'd3:    out = 7'b100_1111;
      4'd4:    out = 7'b110_0110;
      4'd5:    out = 7'b110_1101;
      4'd6:    out = 7'b111_1101;
      4'd7:    out = 7'b000_0111;
      4'd8:    out = 7'b111_1111;
      4'd9:    out = 7'b110_1111;
      default: out = SEG_BLANK;
    endcase
  end

endmodule
