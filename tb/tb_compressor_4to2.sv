// tb_compressor_4to2: exhaustive check of the 4:2 compressor:
// x1+x2+x3+x4+cin = sum + 2*(carry + cout), and cout does not depend on cin.
module tb_compressor_4to2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  logic cout_cin0;
  int   checks = 0, failures = 0;

  compressor_4to2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                       .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = ci[0];
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) !=
            int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)) begin
          failures++;
          $display("in=%04b cin=%0b: sum=%0b carry=%0b cout=%0b", v[3:0], cin, sum, carry, cout);
        end
        if (ci == 0) cout_cin0 = cout;
        else begin
          checks++;
          if (cout !== cout_cin0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
