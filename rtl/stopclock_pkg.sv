// Shared types and constants of the stopclock.
//
// A displayed digit is held as a 4-bit unsigned binary word (0000 = 0 ...
// 1001 = 9) and shown as a 7-bit segment pattern in which bit i drives
// segment i: 0 top, 1 upper right, 2 lower right, 3 bottom, 4 lower left,
// 5 upper left, 6 middle. A segment is lit when its bit is 1.
// The binary digit code, the segment numbering and the patterns of 0, 1, 2,
// 8 and 9 follow the original design; the patterns of 3 to 7 are the usual
// ones and are this design's choice.
package stopclock_pkg;

  typedef logic [3:0] word4_t;
  typedef logic [6:0] seg7_t;

  // Largest value of each digit: tenths and seconds count 0..9,
  // tens of seconds count 0..5, so the clock wraps after 59.9 s.
  localparam int unsigned TENTHS_MAX = 9;
  localparam int unsigned SECS_MAX   = 9;
  localparam int unsigned TENS_MAX   = 5;

  // Pattern shown for a word that is not a digit (10..15): all segments off.
  localparam seg7_t SEG_BLANK = 7'b000_0000;

endpackage
