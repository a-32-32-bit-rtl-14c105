// tb_sdfa: exhaustive check of the signed-digit full adder over the linear
// sums -6..6. Expected carry and intermediate sum follow the SDFA rule
// (c = 1 for z >= 2, c = -1 for z <= -2, else 0; w = z - 4c) and the
// inverted output must be -w.
module tb_sdfa;
  import sd_pkg::*;
  sd_digit_t z, c, w_inv;
  int checks = 0, failures = 0;

  sdfa dut (.z, .c, .w_inv);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -6; v <= 6; v++) begin
      int ec, ew;
      z = sd_digit_t'(v);
      #1;
      ec = (v >= 2) ? 1 : (v <= -2) ? -1 : 0;
      ew = v - 4 * ec;
      checks++;
      if (int'(c) != ec || int'(w_inv) != -ew || ew < -2 || ew > 2) begin
        failures++;
        $display("FAIL z=%0d c=%0d w_inv=%0d (want c=%0d w_inv=%0d)", v, c, w_inv, ec, -ew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
