// tb_two_comp_mul: end-to-end test of the registered multiplier at its
// default size (8 x 8, 8-bit fixed-width output), no parameters overridden.
//
// All 65,536 operand pairs are applied, one per clock, followed by the two
// operand pairs of the reference simulation (11110000 x 00001111 and
// 01010101 x 01010101). Each product must appear at p exactly one clock after
// its operands are applied (single-cycle latency and throughput), and p_fixed
// must be the product rounded to 8 bits, floor((P + 128) / 256). A reset in
// the middle of the run must clear both outputs.
// Coverage: every Booth digit value in every row (0, +1, +2, -1, -2 and the
// -0 window 111; the first row only has 0, +1, -1, -2), the last row's
// negative bit folded into the first row, the carry of that short addition
// into the sign-extension bits, and rounding that changes the kept bits. Any
// of these that never happens counts as a failure.
module tb_two_comp_mul;
  import mbe_pkg::*;

  localparam int M = 8, N = 8, FW = 8, R = N / 2;

  logic          clk = 0;
  logic          rst_n;
  logic [M-1:0]  x;
  logic [N-1:0]  y;
  logic [M+N-1:0] p;
  logic [FW-1:0] p_fixed;

  int checks = 0, failures = 0;
  int cycles = 0;
  int digit_seen [R][6];   // [row][0:0 1:+1 2:+2 3:-2 4:-1 5:-0]
  int fold_neg = 0, fold_carry = 0, round_up = 0, resets_seen = 0;

  two_comp_mul dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .p(p), .p_fixed(p_fixed));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_class(logic [2:0] w);
    case (w)
      3'b000:          return 0;
      3'b001, 3'b010:  return 1;
      3'b011:          return 2;
      3'b100:          return 3;
      3'b101, 3'b110:  return 4;
      default:         return 5;
    endcase
  endfunction

  // sample what the operands exercise while they are applied
  task automatic cover_operands();
    logic [N:0] ye;
    ye = {y, 1'b0};
    for (int i = 0; i < R; i++) digit_seen[i][digit_class(ye[2*i +: 3])]++;
    if (dut.u_core.u_array.u_first.neg_last) fold_neg++;
    if (dut.u_core.u_array.u_first.carry) fold_carry++;
  endtask

  task automatic check_outputs(logic [M-1:0] xa, logic [N-1:0] ya);
    int prod, e;
    prod = int'($signed(xa)) * int'($signed(ya));
    e = (prod + 128) >>> 8;
    checks++;
    if (p !== (M+N)'(prod) || p_fixed !== FW'(e)) begin
      failures++;
      if (failures < 10)
        $display("%0d * %0d: p=%h p_fixed=%h, expected %h %h", $signed(xa), $signed(ya), p, p_fixed,
                 (M+N)'(prod), FW'(e));
    end
    if (FW'(e) != FW'(prod >>> 8)) round_up++;
  endtask

  initial begin
    logic [M-1:0] px;
    logic [N-1:0] py;
    int start;
    for (int i = 0; i < R; i++) for (int k = 0; k < 6; k++) digit_seen[i][k] = 0;
    rst_n = 0;
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (p !== '0 || p_fixed !== '0) failures++;
    rst_n = 1;

    // exhaustive run, one operand pair per clock: the product of the pair
    // applied before an edge is at p after that edge, while before the edge
    // p still holds the previous product
    start = cycles;
    for (int v = 0; v < (1 << (M + N)); v++) begin
      x = M'(v >> N);
      y = N'(v);
      #1 cover_operands();
      if (v > 0) begin
        checks++;
        if (p !== (M+N)'(int'($signed(px)) * int'($signed(py)))) failures++;
      end
      @(posedge clk);
      #1 check_outputs(x, y);
      px = x; py = y;
    end
    checks++;
    if (cycles - start != (1 << (M + N))) begin
      failures++;
      $display("throughput: %0d cycles", cycles - start);
    end

    // the operands of the reference waveform
    x = 8'b11110000; y = 8'b00001111;
    @(posedge clk); #1;
    checks++;
    if (p !== 16'b1111111100010000) failures++;
    x = 8'b01010101; y = 8'b01010101;
    @(posedge clk); #1;
    checks++;
    if (p !== 16'b0001110000111001) failures++;

    // asynchronous reset in mid-operation
    #2 rst_n = 0;
    #1;
    checks++;
    if (p !== '0 || p_fixed !== '0) failures++;
    else resets_seen++;
    rst_n = 1;

    // coverage
    for (int i = 0; i < R; i++)
      for (int k = 0; k < 6; k++) begin
        if (i == 0 && (k == 2 || k == 5)) continue;  // first window has y[-1] = 0
        checks++;
        if (digit_seen[i][k] == 0) begin
          failures++;
          $display("row %0d digit class %0d never occurred", i, k);
        end
      end
    checks++; if (fold_neg == 0)    begin failures++; $display("no folded negative bit"); end
    checks++; if (fold_carry == 0)  begin failures++; $display("no fold-in carry"); end
    checks++; if (round_up == 0)    begin failures++; $display("rounding never changed a result"); end
    checks++; if (resets_seen == 0) begin failures++; $display("reset not exercised"); end
    $display("folded negative bits %0d, fold-in carries %0d, roundings up %0d, resets %0d",
             fold_neg, fold_carry, round_up, resets_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
