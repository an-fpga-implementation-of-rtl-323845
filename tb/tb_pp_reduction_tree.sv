// tb_pp_reduction_tree: the two output rows of the compression tree must add
// up, modulo 2^W, to the sum of its input rows. Instances with 4 rows (one
// level of 4:2 compressors, the 8 x 8 case), 5 rows (the height of a
// conventional array), 3, 7 and 1 rows cover every way a level can be built.
module tb_pp_reduction_tree;
  localparam int W = 16;

  logic [3:0][W-1:0] r4;  logic [W-1:0] s4, c4;
  logic [4:0][W-1:0] r5;  logic [W-1:0] s5, c5;
  logic [2:0][W-1:0] r3;  logic [W-1:0] s3, c3;
  logic [6:0][W-1:0] r7;  logic [W-1:0] s7, c7;
  logic [0:0][W-1:0] r1;  logic [W-1:0] s1, c1;

  int checks = 0, failures = 0;

  pp_reduction_tree #(.W(W), .R(4)) dut4 (.rows(r4), .sum(s4), .carry(c4));
  pp_reduction_tree #(.W(W), .R(5)) dut5 (.rows(r5), .sum(s5), .carry(c5));
  pp_reduction_tree #(.W(W), .R(3)) dut3 (.rows(r3), .sum(s3), .carry(c3));
  pp_reduction_tree #(.W(W), .R(7)) dut7 (.rows(r7), .sum(s7), .carry(c7));
  pp_reduction_tree #(.W(W), .R(1)) dut1 (.rows(r1), .sum(s1), .carry(c1));

  task automatic check(string name, int unsigned got, int unsigned expv);
    checks++;
    if ((got & 32'hFFFF) != (expv & 32'hFFFF)) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", name, got & 32'hFFFF, expv & 32'hFFFF);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int unsigned e4, e5, e3, e7;
      for (int i = 0; i < 4; i++) r4[i] = (k == 0) ? '1 : W'($urandom);
      for (int i = 0; i < 5; i++) r5[i] = (k == 0) ? '1 : W'($urandom);
      for (int i = 0; i < 3; i++) r3[i] = (k == 0) ? '1 : W'($urandom);
      for (int i = 0; i < 7; i++) r7[i] = (k == 0) ? '1 : W'($urandom);
      r1[0] = W'($urandom);
      #1;
      e4 = 0; e5 = 0; e3 = 0; e7 = 0;
      for (int i = 0; i < 4; i++) e4 += r4[i];
      for (int i = 0; i < 5; i++) e5 += r5[i];
      for (int i = 0; i < 3; i++) e3 += r3[i];
      for (int i = 0; i < 7; i++) e7 += r7[i];
      check("R=4", s4 + c4, e4);
      check("R=5", s5 + c5, e5);
      check("R=3", s3 + c3, e3);
      check("R=7", s7 + c7, e7);
      check("R=1", s1 + c1, r1[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
