// final_adder: carry-propagate adder that turns the carry-save pair left by
// the reduction tree into the product in plain binary. The result is taken
// modulo 2^W. Written as a behavioural '+' so that the synthesis tool maps it
// onto the FPGA's carry chain. Purely combinational.
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  assign s = a + b;

endmodule
