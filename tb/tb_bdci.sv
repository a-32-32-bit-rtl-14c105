// tb_bdci: every bidirectional level -7..7 must come out as pos = max(z,0)
// and neg = max(-z,0).
module tb_bdci;
  import sd_pkg::*;
  sd_digit_t z;
  ulevel_t   pos, neg;
  int checks = 0, failures = 0;

  bdci dut (.z, .pos, .neg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -7; v <= 7; v++) begin
      z = sd_digit_t'(v);
      #1;
      checks++;
      if (int'(pos) != (v > 0 ? v : 0) || int'(neg) != (v < 0 ? -v : 0)) begin
        failures++;
        $display("FAIL z=%0d pos=%0d neg=%0d", v, pos, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
