// compressor_4to2: 4:2 compressor cell built from two full adders.
//
// It reduces four bits of one column plus the lateral carry cin from the
// column to its right to a sum bit (same weight) and two bits of double
// weight, carry and cout:  x1+x2+x3+x4+cin = sum + 2*(carry + cout).
// cout depends only on x1..x3, never on cin, so a row of these cells has no
// rippling carry chain: the lateral signal crosses one column only.
// Purely combinational.
module compressor_4to2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3),  .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .c(cin), .sum(sum), .carry(carry));

endmodule
