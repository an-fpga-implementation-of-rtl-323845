// booth_pp_row: one radix-4 MBE partial product row (rows 1 .. N/2-1).
//
// For every bit position j of the (M+1)-bit row it applies the usual MBE
// partial product cell:
//   pp[j] = ((one & x[j]) | (two & x[j-1])) XOR neg
// with x[-1] = 0 and x[M] = x[M-1] (sign extension of the multiplicand), so
// the row holds d*X for d >= 0 and the one's complement of |d|*X for d < 0.
// The missing +1 of a negative row is the separate neg bit, which the array
// places in the row's least significant column. Bit M is the row's sign bit.
// This is the standard MBE cell. Purely combinational.
module booth_pp_row
  import mbe_pkg::*;
#(
  parameter int unsigned M = 8  // multiplicand width
) (
  input  logic [M-1:0] x,    // multiplicand, two's complement
  input  mbe_sel_t     sel,  // encoded Booth digit of this row
  output logic [M:0]   pp    // row bits, pp[M] is the sign
);

  logic [M+1:0] xe;  // {x[M-1], x, 1'b0}: xe[j+1] = x[j], xe[0] = x[-1] = 0

  assign xe = {x[M-1], x, 1'b0};

  always_comb begin
    for (int j = 0; j <= M; j++) begin
      pp[j] = ((sel.one & xe[j+1]) | (sel.two & xe[j])) ^ sel.neg;
    end
  end

endmodule
