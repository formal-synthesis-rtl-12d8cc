// Helpers shared by the stopclock testbenches (included inside a module).
// They work on the user-level view of the clock: a display value is held as
// the integer 100*tens + 10*secs + tenths.

// Digit shown by a seven-segment pattern (bit i = segment i: 0 top,
// 1 upper right, 2 lower right, 3 bottom, 4 lower left, 5 upper left,
// 6 middle), or -1 if the pattern is not a digit. The pictures are written
// as lists of lit segments.
function automatic int seg_to_digit(logic [6:0] pattern);
  string picture [10] = '{"012345", "12", "01346", "01236", "1256",
                          "02356", "023456", "012", "0123456", "012356"};
  for (int d = 0; d < 10; d++) begin
    logic [6:0] p = '0;
    for (int k = 0; k < picture[d].len(); k++) p[3'(picture[d][k] - "0")] = 1'b1;
    if (p == pattern) return d;
  end
  return -1;
endfunction

// Next value of the display when the clock runs: 00.0 .. 59.9, then 00.0.
function automatic int next_time(int v);
  int tens = v / 100, secs = (v / 10) % 10, tenths = v % 10;
  if (tenths < 9)    return v + 1;
  else if (secs < 9) return tens * 100 + (secs + 1) * 10;
  else if (tens < 5) return (tens + 1) * 100;
  else               return 0;
endfunction
