// tb_full_adder: exhaustive check that sum + 2*carry = a + b + c.
module tb_full_adder;
  logic a, b, c, sum, carry;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("a=%0b b=%0b c=%0b: sum=%0b carry=%0b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
