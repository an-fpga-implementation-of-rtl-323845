// tb_booth_encoder: exhaustive check of the radix-4 Booth digit encoder.
// For each of the eight windows the expected digit d = -2*y[2i+1] + y[2i] +
// y[2i-1] is worked out arithmetically, and the one/two/neg outputs are
// compared with |d| == 1, |d| == 2 and the window's top bit.
module tb_booth_encoder;
  import mbe_pkg::*;

  logic     y_hi, y_mid, y_lo;
  mbe_sel_t sel;
  int       checks = 0, failures = 0;

  booth_encoder dut (.y_hi(y_hi), .y_mid(y_mid), .y_lo(y_lo), .sel(sel));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 8; w++) begin
      int d, mag;
      {y_hi, y_mid, y_lo} = 3'(w);
      #1;
      d   = -2 * int'(y_hi) + int'(y_mid) + int'(y_lo);
      mag = (d < 0) ? -d : d;
      checks++;
      if (sel.one !== (mag == 1) || sel.two !== (mag == 2) || sel.neg !== y_hi) begin
        failures++;
        $display("window %03b: one=%0b two=%0b neg=%0b, digit %0d", w[2:0], sel.one, sel.two, sel.neg, d);
      end
      // one and two are never both set
      checks++;
      if (sel.one && sel.two) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
