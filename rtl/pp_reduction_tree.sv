// pp_reduction_tree: compresses R partial product rows of W bits into two
// rows (carry-save form) whose sum equals the sum of the inputs modulo 2^W.
//
// The tree works row-wise. At each level the rows are taken four at a time
// through a row of compressor_4to2 cells (the lateral cout of column j feeds
// cin of column j+1); a leftover group of three goes through a row of
// full_adder cells; one or two leftover rows are passed on unchanged. Levels
// are repeated until two rows remain. The level count and the rows per level
// are worked out at elaboration time (mbe_pkg::tree_rows_at). For the 8x8
// multiplier the array has N/2 = 4 rows, so a single level of 4:2 compressors
// suffices; with the extra row of a conventional MBE array (5 rows) two
// levels would be needed. Carries out of column W-1 are dropped.
// The technique only fixes the array height; the row-wise 4:2 organisation of
// the tree is a choice of this design.
// Inputs that are constant zero (empty positions of the array) are left for
// synthesis to simplify. Purely combinational.
module pp_reduction_tree
  import mbe_pkg::*;
#(
  parameter int unsigned W = 16,  // row width
  parameter int unsigned R = 4    // number of input rows (>= 1)
) (
  input  logic [R-1:0][W-1:0] rows,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);

  localparam int unsigned LEVELS = tree_levels(R);

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned CI  = tree_rows_at(R, l);
    localparam int unsigned CO  = tree_rows_next(CI);
    localparam int unsigned G4  = CI / 4;
    localparam int unsigned REM = CI % 4;

    logic [R-1:0][W-1:0] din;   // rows entering this level (CI used)
    logic [R-1:0][W-1:0] dout;  // rows leaving this level (CO used)

    if (l == 0) begin : g_src_in
      assign din = rows;
    end else begin : g_src_prev
      assign din = g_lvl[l-1].dout;
    end

    // groups of four rows -> two rows
    for (genvar g = 0; g < G4; g++) begin : g_c42
      logic [W-1:0] s, c, co;
      for (genvar j = 0; j < W; j++) begin : g_bit
        compressor_4to2 u_c42 (
          .x1   (din[4*g][j]),
          .x2   (din[4*g+1][j]),
          .x3   (din[4*g+2][j]),
          .x4   (din[4*g+3][j]),
          .cin  ((j == 0) ? 1'b0 : co[(j == 0) ? 0 : j-1]),
          .sum  (s[j]),
          .carry(c[j]),
          .cout (co[j])
        );
      end
      assign dout[2*g]   = s;
      assign dout[2*g+1] = {c[W-2:0], 1'b0};
    end

    if (REM == 3) begin : g_c32
      logic [W-1:0] s, c;
      for (genvar j = 0; j < W; j++) begin : g_bit
        full_adder u_fa (
          .a    (din[4*G4][j]),
          .b    (din[4*G4+1][j]),
          .c    (din[4*G4+2][j]),
          .sum  (s[j]),
          .carry(c[j])
        );
      end
      assign dout[2*G4]   = s;
      assign dout[2*G4+1] = {c[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_row
        assign dout[2*G4+r] = din[4*G4+r];
      end
    end

    // rows beyond the count of the next level are unused
    for (genvar r = CO; r < R; r++) begin : g_zero
      assign dout[r] = '0;
    end
  end

  if (LEVELS == 0) begin : g_direct
    assign sum = rows[0];
    if (R >= 2) begin : g_two
      assign carry = rows[1];
    end else begin : g_one
      assign carry = '0;
    end
  end else begin : g_out
    assign sum   = g_lvl[LEVELS-1].dout[0];
    assign carry = g_lvl[LEVELS-1].dout[1];
  end

endmodule
