// tb_fixed_width_round: the rounded 8-bit result must equal
// floor((P + 2^7) / 2^8) for a 16-bit signed product P, whatever split of P
// into a carry-save pair the stage receives. Products come from random
// operands; the split is random.
module tb_fixed_width_round;
  localparam int W = 16, FW = 8;

  logic [W-1:0]  cs_sum, cs_carry;
  logic [FW-1:0] p_fixed;
  int checks = 0, failures = 0;

  fixed_width_round #(.W(W), .FW(FW)) dut (.cs_sum(cs_sum), .cs_carry(cs_carry), .p_fixed(p_fixed));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      int xs, ys, prod, e;
      xs = int'($signed(8'($urandom)));
      ys = int'($signed(8'($urandom)));
      if (k == 0) begin xs = -128; ys = -128; end
      if (k == 1) begin xs = 1; ys = 127; end    // 127 -> rounds to 0
      if (k == 2) begin xs = 1; ys = -128; end   // -128 -> half way, rounds up to 0
      if (k == 3) begin xs = -1; ys = 127; end   // -127 -> 0
      prod = xs * ys;
      e = (prod + 128) >>> 8;
      cs_sum   = W'($urandom);
      cs_carry = W'(prod) - cs_sum;
      #1;
      checks++;
      if (p_fixed !== FW'(e)) begin
        failures++;
        if (failures < 10) $display("P=%0d: got %0d expected %0d", prod, $signed(p_fixed), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
