// tb_final_adder: random and corner-case check of the carry-propagate adder
// (16 bits, result modulo 2^16).
module tb_final_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      int unsigned ea;
      case (k)
        0: begin a = '1; b = 16'd1; end
        1: begin a = '1; b = '1; end
        2: begin a = '0; b = '0; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      #1;
      ea = (int'(a) + int'(b)) % (1 << W);
      checks++;
      if (int'(s) != int'(ea)) begin
        failures++;
        if (failures < 10) $display("%h + %h = %h", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
