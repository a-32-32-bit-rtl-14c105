// tb_psda: random radix-4 SD operands (digits -3..3) through a 32-digit
// parallel SD adder, with true (INV_OUT=0) and negated (INV_OUT=1) output.
// The value of the sum digits must equal the sum of the operand values
// modulo 4^32, and every sum digit must lie in -3..3. A second run adds an
// increment vector with operands limited to -2..2 so the linear sum stays
// inside -6..6.
module tb_psda;
  import sd_pkg::*;
  localparam int D = 32;
  sd_digit_t x [D], y [D], inc [D], s [D], sn [D];
  int checks = 0, failures = 0;

  psda #(.DIGITS(D), .INV_OUT(1'b0)) dut   (.x, .y, .inc, .s);
  psda #(.DIGITS(D), .INV_OUT(1'b1)) dut_n (.x, .y, .inc, .s(sn));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [63:0] vx, vy, vi, vs, vn;
      bit range_ok;
      int lim;
      lim = (t < 1500) ? 3 : 2;
      vx = '0; vy = '0; vi = '0;
      for (int i = D-1; i >= 0; i--) begin
        x[i]   = sd_digit_t'((t % 7 == 0) ? lim : (t % 7 == 1) ? -lim : rnd(-lim, lim));
        y[i]   = sd_digit_t'((t % 7 == 0) ? lim : (t % 7 == 1) ? -lim : rnd(-lim, lim));
        inc[i] = sd_digit_t'((t < 1500) ? 0 : rnd(-2, 2));
        vx = (vx << 2) + 64'(signed'(x[i]));
        vy = (vy << 2) + 64'(signed'(y[i]));
        vi = (vi << 2) + 64'(signed'(inc[i]));
      end
      #1;
      vs = '0; vn = '0;
      range_ok = 1'b1;
      for (int i = D-1; i >= 0; i--) begin
        vs = (vs << 2) + 64'(signed'(s[i]));
        vn = (vn << 2) - 64'(signed'(sn[i]));
        if (s[i] < -4'sd3 || s[i] > 4'sd3 || sn[i] < -4'sd3 || sn[i] > 4'sd3) range_ok = 1'b0;
      end
      checks++;
      if (vs !== vx + vy + vi || vn !== vx + vy + vi || !range_ok) begin
        failures++;
        $display("FAIL t=%0d sum=%h neg=%h want %h range_ok=%0b", t, vs, vn, vx + vy + vi, range_ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
