// two_comp_mul: registered M x N radix-4 MBE two's complement multiplier with
// the partial product array reduced to N/2 rows.
//
// Each rising clock edge captures the product of the operands present at x
// and y: p = x * y (full M+N bits) and p_fixed = x * y rounded to its FW most
// significant bits. Latency is one cycle and a new operand pair can be
// applied every cycle. Inside, mbe_mult_core computes the product
// combinationally (pp_array -> pp_reduction_tree -> final_adder) and
// fixed_width_round derives the rounded product from the same carry-save
// pair. The output registers and their reset are this design's choice; the
// multiplier itself is single-cycle combinational logic. rst_n is an asynchronous, active-low reset that clears the outputs.
module two_comp_mul #(
  parameter int unsigned M  = 8,  // multiplicand width
  parameter int unsigned N  = 8,  // multiplier width (even, 4 <= N <= M)
  parameter int unsigned FW = 8   // width of the fixed-width product
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M-1:0]      x,        // multiplicand, two's complement
  input  logic [N-1:0]      y,        // multiplier, two's complement
  output logic [M+N-1:0]    p,        // x*y, registered
  output logic [FW-1:0]     p_fixed   // x*y rounded to FW bits, registered
);

  localparam int unsigned W = M + N;

  logic [W-1:0]  prod, cs_sum, cs_carry;
  logic [FW-1:0] prod_fixed;

  mbe_mult_core #(.M(M), .N(N)) u_core (
    .x       (x),
    .y       (y),
    .p       (prod),
    .cs_sum  (cs_sum),
    .cs_carry(cs_carry)
  );

  fixed_width_round #(.W(W), .FW(FW)) u_round (
    .cs_sum  (cs_sum),
    .cs_carry(cs_carry),
    .p_fixed (prod_fixed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p       <= '0;
      p_fixed <= '0;
    end else begin
      p       <= prod;
      p_fixed <= prod_fixed;
    end
  end

endmodule
