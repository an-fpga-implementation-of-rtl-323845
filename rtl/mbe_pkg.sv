// mbe_pkg: types and elaboration-time helpers shared by the radix-4 Modified
// Booth Encoded (MBE) multiplier.
//
// mbe_sel_t is the encoded form of one radix-4 Booth digit d in {-2,-1,0,+1,+2}:
// 'one' selects |d| = 1, 'two' selects |d| = 2 and 'neg' marks a negative digit.
// A row is formed as (one ? X : two ? 2X : 0) XOR neg, and the neg bit is added
// in the row's least significant column to finish the two's complement.
//
// The tree helpers compute, at elaboration time, how many rows remain after
// each level of the reduction tree: each group of four rows goes through a
// level of 4:2 compressors, a leftover group of three through 3:2 counters, and
// one or two leftover rows pass straight through.
package mbe_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic two;  // |digit| == 2
    logic one;  // |digit| == 1
  } mbe_sel_t;

  // Rows left after one level of the reduction tree, starting from r rows.
  function automatic int unsigned tree_rows_next(int unsigned r);
    int unsigned rem;
    if (r <= 2) return r;
    rem = r % 4;
    return 2 * (r / 4) + ((rem == 3) ? 2 : rem);
  endfunction

  // Rows present at the input of level 'lvl' (level 0 holds the r input rows).
  function automatic int unsigned tree_rows_at(int unsigned r, int unsigned lvl);
    int unsigned c;
    c = r;
    for (int unsigned k = 0; k < lvl; k++) c = tree_rows_next(c);
    return c;
  endfunction

  // Number of compressor levels needed to bring r rows down to two.
  function automatic int unsigned tree_levels(int unsigned r);
    int unsigned c;
    int unsigned n;
    c = r;
    n = 0;
    while (c > 2) begin
      c = tree_rows_next(c);
      n++;
    end
    return n;
  endfunction

endpackage
