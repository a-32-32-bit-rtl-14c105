// tb_threshold_detector: TD(T, M) for the settings the design uses, TD(1,1)
// and TD(2,1), and a wider one, TD(3,2), on every input level 0..7:
// y = M when x >= T, else 0.
module tb_threshold_detector;
  import sd_pkg::*;
  ulevel_t x, y11, y21, y32;
  int checks = 0, failures = 0;

  threshold_detector #(.T(1), .M(1)) dut11 (.x, .y(y11));
  threshold_detector #(.T(2), .M(1)) dut21 (.x, .y(y21));
  threshold_detector #(.T(3), .M(2)) dut32 (.x, .y(y32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 7; v++) begin
      x = ulevel_t'(v);
      #1;
      checks += 3;
      if (int'(y11) != (v >= 1 ? 1 : 0)) begin failures++; $display("FAIL TD(1,1) x=%0d y=%0d", v, y11); end
      if (int'(y21) != (v >= 2 ? 1 : 0)) begin failures++; $display("FAIL TD(2,1) x=%0d y=%0d", v, y21); end
      if (int'(y32) != (v >= 3 ? 2 : 0)) begin failures++; $display("FAIL TD(3,2) x=%0d y=%0d", v, y32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
