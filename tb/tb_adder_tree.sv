// tb_adder_tree: eight random partial products, with digits drawn from the
// ranges the generators produce (even groups -1..3, odd groups -3..1, top two
// digits -2..2 and -1..1) and increments 0..2 (even) / -2..0 (odd), are summed
// by the three-level tree. The output digits, negated, must lie in -3..3 and
// their value must equal sum (P_j + inc_j) * 16^j modulo 2^64.
module tb_adder_tree;
  import sd_pkg::*;
  localparam int N = 32;
  localparam int G = N / 4;
  localparam int D = N / 2 + 2;

  sd_digit_t pp [G][D];
  sd_digit_t inc [G];
  sd_digit_t sum_inv [N];
  int checks = 0, failures = 0;

  adder_tree #(.N(N)) dut (.pp, .inc, .sum_inv);

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
      logic [63:0] want, got;
      bit ok;
      want = '0;
      for (int j = 0; j < G; j++) begin
        logic [63:0] vj;
        bit odd;
        odd = (j % 2 == 1);
        vj = '0;
        for (int i = D-1; i >= 0; i--) begin
          int v;
          if (i == D-1)      v = rnd(-1, 1);
          else if (i == D-2) v = rnd(-2, 2);
          else if (t % 5 == 0) v = odd ? -3 : 3;            // extreme digits
          else if (t % 5 == 1) v = odd ? 1 : -1;
          else               v = odd ? rnd(-3, 1) : rnd(-1, 3);
          pp[j][i] = sd_digit_t'(v);
          vj = (vj << 2) + 64'(signed'(pp[j][i]));
        end
        inc[j] = sd_digit_t'((t % 5 == 0) ? (odd ? -2 : 2) : (odd ? rnd(-2, 0) : rnd(0, 2)));
        vj = vj + 64'(signed'(inc[j]));
        want = want + (vj << (4*j));
      end
      #1;
      got = '0;
      ok = 1'b1;
      for (int i = N-1; i >= 0; i--) begin
        got = (got << 2) - 64'(signed'(sum_inv[i]));
        if (sum_inv[i] < -4'sd3 || sum_inv[i] > 4'sd3) ok = 1'b0;
      end
      checks++;
      if (got !== want || !ok) begin
        failures++;
        $display("FAIL t=%0d got=%h want=%h digits_ok=%0b", t, got, want, ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
