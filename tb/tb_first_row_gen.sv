// tb_first_row_gen: checks the first row with the last row's negative bit
// folded in. For an M x N instance the row read as an unsigned number over
// columns 0 .. M+2 must equal
//   2^(M+2) + (E0*X - y1) + neg_last * 2^(N-2)
// where E0 = -2*y1 + y0 is the first Booth digit, -y1 accounts for the
// row's own negative bit (added elsewhere) and 2^(M+2) is the row's share of
// the sign-extension constant. Exhaustive for 8 x 8, random for 12 x 8
// (a 5-bit fold-in adder). Both carry values of the short adder must occur.
module tb_first_row_gen;

  localparam int M = 8, N = 8;
  localparam int M2 = 12, N2 = 8;

  logic [M-1:0]  x;
  logic [1:0]    y;
  logic          neg_last;
  logic [M+2:0]  row;
  logic          neg0, carry;

  logic [M2-1:0] x2;
  logic [1:0]    y2;
  logic          nl2;
  logic [M2+2:0] row2;
  logic          neg02, carry2;

  int checks = 0, failures = 0;
  int carries = 0;

  first_row_gen #(.M(M), .N(N)) dut (
    .x(x), .y(y), .neg_last(neg_last), .row(row), .neg0(neg0), .carry(carry));
  first_row_gen #(.M(M2), .N(N2)) dut2 (
    .x(x2), .y(y2), .neg_last(nl2), .row(row2), .neg0(neg02), .carry(carry2));

  function automatic longint expected(int mw, int nw, longint xs, int yy, int nl);
    longint e0;
    e0 = -2 * ((yy >> 1) & 1) + (yy & 1);
    return (longint'(1) << (mw + 2)) + e0 * xs - ((yy >> 1) & 1) + nl * (longint'(1) << (nw - 2));
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x2 = '0; y2 = '0; nl2 = 0;
    for (int xv = 0; xv < (1 << M); xv++)
      for (int yv = 0; yv < 4; yv++)
        for (int nl = 0; nl < 2; nl++) begin
          x = M'(xv); y = 2'(yv); neg_last = nl[0];
          #1;
          checks++;
          if (longint'(row) != expected(M, N, longint'($signed(x)), yv, nl) || neg0 !== y[1]) begin
            failures++;
            if (failures < 10) $display("x=%0d y=%0d nl=%0d row=%h", $signed(x), yv, nl, row);
          end
          if (carry) carries++;
        end
    for (int k = 0; k < 20000; k++) begin
      x2 = M2'($urandom); y2 = 2'($urandom); nl2 = 1'($urandom);
      if (k < 8) x2 = (k % 2 == 0) ? {1'b1, {(M2-1){1'b0}}} : {1'b0, {(M2-1){1'b1}}};
      #1;
      checks++;
      if (longint'(row2) != expected(M2, N2, longint'($signed(x2)), int'(y2), int'(nl2))) begin
        failures++;
        if (failures < 10) $display("12x8: x=%0d y=%0d nl=%0d row=%h", $signed(x2), y2, nl2, row2);
      end
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("fold-in carry never occurred");
    end
    $display("fold-in carries seen: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
