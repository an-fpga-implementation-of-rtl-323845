// fixed_width_round: fixed-width output stage of the multiplier.
//
// The full W-bit product arrives in carry-save form. A rounding bit of 1 is
// added in the most significant column of the part to be truncated (column
// W-FW-1), and only the FW most significant bits are kept: the result is the
// product rounded to FW bits, half-way cases rounded up (towards +infinity).
// This is post-truncation rounding: the whole array is kept, so the result is
// exact; a truncated-array variant with error compensation is not built.
// The rounding bit goes into a row of full adders together with the two
// carry-save rows; one carry-propagate addition follows.
// Purely combinational.
module fixed_width_round #(
  parameter int unsigned W  = 16,  // width of the full product
  parameter int unsigned FW = 8    // width kept (1 <= FW < W)
) (
  input  logic [W-1:0]  cs_sum,
  input  logic [W-1:0]  cs_carry,
  output logic [FW-1:0] p_fixed
);

  localparam logic [W-1:0] RND = W'(1) << (W - FW - 1);

  logic [W-1:0] s, c, t;

  for (genvar j = 0; j < W; j++) begin : g_bit
    full_adder u_fa (
      .a    (cs_sum[j]),
      .b    (cs_carry[j]),
      .c    (RND[j]),
      .sum  (s[j]),
      .carry(c[j])
    );
  end

  final_adder #(.W(W)) u_cpa (
    .a(s),
    .b({c[W-2:0], 1'b0}),
    .s(t)
  );

  assign p_fixed = t[W-1 -: FW];

endmodule
