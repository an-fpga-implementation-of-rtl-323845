// tb_mbe_mult_core: exhaustive 8 x 8 check of the combinational multiplier
// (product and carry-save pair against the integer product), plus random
// checks of a 16 x 16 and a 12 x 8 instance.
module tb_mbe_mult_core;

  logic [7:0]  x8, y8;   logic [15:0] p8, s8, c8;
  logic [15:0] x16, y16; logic [31:0] p16, s16, c16;
  logic [11:0] x12;      logic [7:0]  y12; logic [19:0] p12, s12, c12;

  int checks = 0, failures = 0;

  mbe_mult_core #(.M(8),  .N(8))  dut8  (.x(x8),  .y(y8),  .p(p8),  .cs_sum(s8),  .cs_carry(c8));
  mbe_mult_core #(.M(16), .N(16)) dut16 (.x(x16), .y(y16), .p(p16), .cs_sum(s16), .cs_carry(c16));
  mbe_mult_core #(.M(12), .N(8))  dut12 (.x(x12), .y(y12), .p(p12), .cs_sum(s12), .cs_carry(c12));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x16 = '0; y16 = '0; x12 = '0; y12 = '0;
    for (int xv = 0; xv < 256; xv++)
      for (int yv = 0; yv < 256; yv++) begin
        logic [15:0] e;
        x8 = 8'(xv); y8 = 8'(yv);
        #1;
        e = 16'(int'($signed(x8)) * int'($signed(y8)));
        checks++;
        if (p8 !== e || 16'(s8 + c8) !== e) begin
          failures++;
          if (failures < 10) $display("8x8: %0d * %0d = %h, expected %h", $signed(x8), $signed(y8), p8, e);
        end
      end
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] e16;
      logic [19:0] e12;
      x16 = 16'($urandom); y16 = 16'($urandom);
      x12 = 12'($urandom); y12 = 8'($urandom);
      if (k == 0) begin x16 = 16'h8000; y16 = 16'h8000; x12 = 12'h800; y12 = 8'h80; end
      #1;
      e16 = 32'(longint'($signed(x16)) * longint'($signed(y16)));
      e12 = 20'(longint'($signed(x12)) * longint'($signed(y12)));
      checks++;
      if (p16 !== e16) begin
        failures++;
        if (failures < 10) $display("16x16: %0d * %0d = %h, expected %h", $signed(x16), $signed(y16), p16, e16);
      end
      checks++;
      if (p12 !== e12) begin
        failures++;
        if (failures < 10) $display("12x8: %0d * %0d = %h, expected %h", $signed(x12), $signed(y12), p12, e12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
