// tb_pp_array: checks the reduced-height partial product array.
// Exhaustive 8 x 8: the N/2 rows must add up, modulo 2^16, to X*Y. The
// occupancy of every position (ORed over all inputs) gives the column
// heights, which must not exceed N/2 and must reach N/2 somewhere. A 10 x 6
// instance (three rows, 3-bit wider fold-in adder) is checked at random.
module tb_pp_array;

  localparam int M = 8, N = 8, R = N / 2, W = M + N;
  localparam int M2 = 10, N2 = 6, R2 = N2 / 2, W2 = M2 + N2;

  logic [M-1:0]          x;
  logic [N-1:0]          y;
  logic [R-1:0][W-1:0]   rows;
  logic [M2-1:0]         x2;
  logic [N2-1:0]         y2;
  logic [R2-1:0][W2-1:0] rows2;

  int checks = 0, failures = 0;

  pp_array #(.M(M), .N(N))   dut  (.x(x),  .y(y),  .rows(rows));
  pp_array #(.M(M2), .N(N2)) dut2 (.x(x2), .y(y2), .rows(rows2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int maxh;
    logic [W-1:0] occ [R];
    for (int r = 0; r < R; r++) occ[r] = '0;
    x2 = '0; y2 = '0;
    for (int xv = 0; xv < (1 << M); xv++)
      for (int yv = 0; yv < (1 << N); yv++) begin
        logic [W-1:0] acc;
        logic [W-1:0] expv;
        x = M'(xv); y = N'(yv);
        #1;
        acc = '0;
        for (int r = 0; r < R; r++) acc += rows[r];
        expv = W'(longint'($signed(x)) * longint'($signed(y)));
        for (int r = 0; r < R; r++) occ[r] = occ[r] | rows[r];
        checks++;
        if (acc !== expv) begin
          failures++;
          if (failures < 10) $display("x=%0d y=%0d: rows sum %h, expected %h", $signed(x), $signed(y), acc, expv);
        end
      end
    maxh = 0;
    for (int c = 0; c < W; c++) begin
      int h;
      h = 0;
      for (int r = 0; r < R; r++) h += int'(occ[r][c]);
      if (h > maxh) maxh = h;
    end
    $display("maximum column height %0d with %0d rows", maxh, R);
    checks++;
    if (maxh != R) failures++;

    for (int k = 0; k < 20000; k++) begin
      logic [W2-1:0] acc2, exp2;
      x2 = M2'($urandom); y2 = N2'($urandom);
      #1;
      acc2 = '0;
      for (int r = 0; r < R2; r++) acc2 += rows2[r];
      exp2 = W2'(longint'($signed(x2)) * longint'($signed(y2)));
      checks++;
      if (acc2 !== exp2) begin
        failures++;
        if (failures < 10) $display("10x6: x=%0d y=%0d: rows sum %h, expected %h", $signed(x2), $signed(y2), acc2, exp2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
