// first_row_gen: first partial product row of the reduced-height MBE array,
// with the negative bit of the last row folded into it.
//
// The first Booth window is (y[1], y[0], 0), so its digit is only 0, +1, -1
// or -2 and the encoder merges into the bit cells:
//   pp[j] = (y0 & (x[j] ^ y1)) | (~y0 & y1 & ~x[j-1])        (x[-1]=0, x[M]=x[M-1])
// Bits 0 .. N-3 leave the cell directly. The weights N-2 .. M (three bits for
// a square multiplier, M-N+3 in general) are added to neg_last, the negative
// bit of the last row, which sits in column N-2. The carry c of that short
// addition then updates the two sign-extension bits of the row, which are
// ~s s s before the addition (s = pp[M]):
//   column M+1 = s ^ c,   column M+2 = ~s | c.
// The whole row therefore occupies columns 0 .. M+2 and the last row needs
// no separate neg bit, which lowers the array height from N/2+1 to N/2.
// Folding the last negative bit into a short addition on the first row is the
// technique this multiplier is built around; the exact gate form of the cell
// and the sign-bit update are this design's own.
// neg0 (= y[1]) is the first row's own negative bit; the array places it in
// column 0 of the second row. Purely combinational; the short adder runs in
// parallel with the other rows' generation and does not feed them.
module first_row_gen #(
  parameter int unsigned M = 8,  // multiplicand width
  parameter int unsigned N = 8   // multiplier width (even, N <= M)
) (
  input  logic [M-1:0] x,         // multiplicand
  input  logic [1:0]   y,         // y[1:0] of the multiplier
  input  logic         neg_last,  // negative bit of the last row
  output logic [M+2:0] row,       // row bits, columns 0 .. M+2
  output logic         neg0,      // negative bit of this row (column 0)
  output logic         carry      // carry out of the short addition
);

  localparam int unsigned AW = M - N + 3;  // width of the short adder

  logic [M+1:0]  xe;   // xe[j+1] = x[j], xe[0] = 0, xe[M+1] = x[M-1]
  logic [M:0]    pp;   // plain first-row bits before the fold-in
  logic [AW:0]   top;  // {carry, sum} of the short addition
  logic          s;

  assign xe = {x[M-1], x, 1'b0};

  always_comb begin
    for (int j = 0; j <= M; j++) begin
      pp[j] = (y[0] & (xe[j+1] ^ y[1])) | (~y[0] & y[1] & ~xe[j]);
    end
  end

  assign s     = pp[M];
  assign top   = {1'b0, pp[M:N-2]} + {{AW{1'b0}}, neg_last};
  assign carry = top[AW];
  assign neg0  = y[1];

  always_comb begin
    row            = '0;
    row[N-3:0]     = pp[N-3:0];
    row[M:N-2]     = top[AW-1:0];
    row[M+1]       = s ^ carry;
    row[M+2]       = ~s | carry;
  end

  initial begin
    assert (N >= 4 && N % 2 == 0 && N <= M)
      else $error("first_row_gen: N must be even, at least 4 and not above M");
  end

endmodule
