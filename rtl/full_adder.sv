// full_adder: 3:2 counter, the basic cell of the reduction tree.
// sum = a ^ b ^ c, carry = majority(a, b, c); carry has twice the weight of sum.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);

endmodule
