// tb_booth_pp_row: checks the partial product row cell for every Booth digit
// over all 8-bit multiplicands. The (M+1)-bit row read as a signed number must
// equal d*X for d >= 0 and -|d|*X - 1 (one's complement) for d < 0.
module tb_booth_pp_row;
  import mbe_pkg::*;

  localparam int M = 8;

  logic [M-1:0] x;
  mbe_sel_t     sel;
  logic [M:0]   pp;
  int           checks = 0, failures = 0;

  booth_pp_row #(.M(M)) dut (.x(x), .sel(sel), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // digits: 0, +1, +2, -2, -1, -0
    for (int k = 0; k < 6; k++) begin
      int mag;
      logic n;
      case (k)
        0: begin mag = 0; n = 0; end
        1: begin mag = 1; n = 0; end
        2: begin mag = 2; n = 0; end
        3: begin mag = 2; n = 1; end
        4: begin mag = 1; n = 1; end
        default: begin mag = 0; n = 1; end
      endcase
      for (int xv = 0; xv < (1 << M); xv++) begin
        int xs, expv, got;
        x = M'(xv);
        sel.one = (mag == 1);
        sel.two = (mag == 2);
        sel.neg = n;
        #1;
        xs   = int'($signed(x));
        expv = n ? (-mag * xs - 1) : (mag * xs);
        got  = int'($signed(pp));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("x=%0d mag=%0d neg=%0b: row %0d, expected %0d", xs, mag, n, got, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
