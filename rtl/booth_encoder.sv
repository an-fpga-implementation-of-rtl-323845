// booth_encoder: radix-4 Modified Booth digit encoder.
//
// It scans one three-bit window (y[2i+1], y[2i], y[2i-1]) of the multiplier and
// returns the select signals of the digit d = -2*y[2i+1] + y[2i] + y[2i-1]:
//   one = y[2i] XOR y[2i-1]                       (|d| = 1)
//   two = the window is 011 or 100                 (|d| = 2)
//   neg = y[2i+1]                                  (d negative; 111 gives -0)
// This is the usual one/two/neg encoder of the radix-4 MBE table. The window
// 111 yields neg=1 with a zero magnitude: the row becomes all ones and the neg
// bit added at its LSB brings it back to zero, so no special case is needed.
// Purely combinational, no clock.
module booth_encoder
  import mbe_pkg::*;
(
  input  logic     y_hi,   // y[2i+1]
  input  logic     y_mid,  // y[2i]
  input  logic     y_lo,   // y[2i-1] (0 for the first window)
  output mbe_sel_t sel
);

  always_comb begin
    sel.one = y_mid ^ y_lo;
    sel.two = (y_hi & ~y_mid & ~y_lo) | (~y_hi & y_mid & y_lo);
    sel.neg = y_hi;
  end

endmodule
