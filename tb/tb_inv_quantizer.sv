// tb_inv_quantizer: checks the inverted quantizer on every input level -7..7:
// y = -x inside the dynamic range -2..2, clipped to -+2 outside it.
module tb_inv_quantizer;
  import sd_pkg::*;
  sd_digit_t x, y;
  int checks = 0, failures = 0;

  inv_quantizer dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -7; v <= 7; v++) begin
      int e;
      x = sd_digit_t'(v);
      #1;
      e = (v > 2) ? -2 : (v < -2) ? 2 : -v;
      checks++;
      if (int'(y) != e) begin
        failures++;
        $display("FAIL x=%0d y=%0d want %0d", v, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
