// pp_array: partial product array of the radix-4 MBE multiplier with the
// maximum column height reduced from N/2+1 to N/2.
//
// Row 0 comes from first_row_gen, which also absorbs the negative bit of the
// last row. Rows i = 1 .. N/2-1 come from a booth_encoder on the window
// (y[2i+1], y[2i], y[2i-1]) and a booth_pp_row, shifted left by 2i. Sign
// extension is avoided with the usual constant scheme: the sign bit of rows
// 1.. is inverted and a constant 1 placed above it, while row 0 carries
// ~s s s (after the fold-in, see first_row_gen). These constants add up to
// 2^(M+N), which vanishes modulo the product width. The negative bit of row
// i-1 sits in column 2(i-1) of row i, a position that row leaves empty, so the
// N/2 row vectors hold every bit of the array and their sum modulo 2^(M+N) is
// the two's complement product X*Y.
// Output: N/2 rows of M+N bits. Purely combinational.
module pp_array
  import mbe_pkg::*;
#(
  parameter int unsigned M = 8,  // multiplicand width
  parameter int unsigned N = 8   // multiplier width (even, 4 <= N <= M)
) (
  input  logic [M-1:0]                 x,     // multiplicand, two's complement
  input  logic [N-1:0]                 y,     // multiplier, two's complement
  output logic [N/2-1:0][M+N-1:0]      rows   // the array, row r in rows[r]
);

  localparam int unsigned R = N / 2;

  mbe_sel_t         sel  [1:R-1];  // row 0 has its own encoder
  logic [M:0]       prow [1:R-1];
  logic [M+2:0]     row0;
  logic             neg0;
  logic             fold_carry;
  logic [R-1:0]     neg;       // negative bit of each row

  for (genvar i = 1; i < R; i++) begin : g_row
    booth_encoder u_enc (
      .y_hi (y[2*i+1]),
      .y_mid(y[2*i]),
      .y_lo (y[2*i-1]),
      .sel  (sel[i])
    );
    booth_pp_row #(.M(M)) u_row (
      .x  (x),
      .sel(sel[i]),
      .pp (prow[i])
    );
    assign neg[i] = sel[i].neg;
  end

  first_row_gen #(.M(M), .N(N)) u_first (
    .x       (x),
    .y       (y[1:0]),
    .neg_last(neg[R-1]),
    .row     (row0),
    .neg0    (neg0),
    .carry   (fold_carry)
  );
  assign neg[0] = neg0;

  always_comb begin
    rows = '0;
    rows[0][M+2:0] = row0;
    for (int i = 1; i < R; i++) begin
      rows[i][2*i +: M]   = prow[i][M-1:0];
      rows[i][2*i + M]    = ~prow[i][M];
      rows[i][2*i + M + 1] = 1'b1;
      rows[i][2*i - 2]    = neg[i-1];
    end
  end

endmodule
