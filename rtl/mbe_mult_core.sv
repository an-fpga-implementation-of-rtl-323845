// mbe_mult_core: combinational M x N two's complement multiplier built from
// the three classic phases: radix-4 MBE partial product generation with the
// reduced-height array (pp_array, N/2 rows), a compression tree down to
// carry-save form (pp_reduction_tree) and a final carry-propagate addition
// (final_adder). The carry-save pair is brought out as well, for units that
// post-process the product (fixed_width_round).
// No clock: the whole multiplication settles in one combinational pass.
module mbe_mult_core #(
  parameter int unsigned M = 8,  // multiplicand width
  parameter int unsigned N = 8   // multiplier width (even, 4 <= N <= M)
) (
  input  logic [M-1:0]   x,         // multiplicand, two's complement
  input  logic [N-1:0]   y,         // multiplier, two's complement
  output logic [M+N-1:0] p,         // product, two's complement
  output logic [M+N-1:0] cs_sum,    // carry-save form of p: p = cs_sum + cs_carry
  output logic [M+N-1:0] cs_carry
);

  localparam int unsigned W = M + N;
  localparam int unsigned R = N / 2;

  logic [R-1:0][W-1:0] rows;

  pp_array #(.M(M), .N(N)) u_array (
    .x   (x),
    .y   (y),
    .rows(rows)
  );

  pp_reduction_tree #(.W(W), .R(R)) u_tree (
    .rows (rows),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  final_adder #(.W(W)) u_cpa (
    .a(cs_sum),
    .b(cs_carry),
    .s(p)
  );

endmodule
