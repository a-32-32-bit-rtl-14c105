// tb_current_mirror: unit and x4 mirrors, with and without reversal of the
// direction, on every input that keeps the output inside -8..7.
module tb_current_mirror;
  import sd_pkg::*;
  ulevel_t   x;
  sd_digit_t y1, y1n, y4, y4n;
  int checks = 0, failures = 0;

  current_mirror #(.GAIN(1), .INVERT(1'b0)) dut1  (.x, .y(y1));
  current_mirror #(.GAIN(1), .INVERT(1'b1)) dut1n (.x, .y(y1n));
  current_mirror #(.GAIN(4), .INVERT(1'b0)) dut4  (.x(ulevel_t'(x[0])), .y(y4));
  current_mirror #(.GAIN(4), .INVERT(1'b1)) dut4n (.x(ulevel_t'(x[1:0] == 2'd2 ? 2'd2 : {1'b0, x[0]})), .y(y4n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 7; v++) begin
      int v4n;
      x = ulevel_t'(v);
      #1;
      v4n = (v % 4 == 2) ? 2 : (v % 2);
      checks += 4;
      if (int'(y1)  !=  v)           begin failures++; $display("FAIL x1 x=%0d y=%0d", v, y1); end
      if (int'(y1n) != -v)           begin failures++; $display("FAIL -x1 x=%0d y=%0d", v, y1n); end
      if (int'(y4)  !=  4 * (v % 2)) begin failures++; $display("FAIL x4 x=%0d y=%0d", v, y4); end
      if (int'(y4n) != -4 * v4n)     begin failures++; $display("FAIL -x4 x=%0d y=%0d", v, y4n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
