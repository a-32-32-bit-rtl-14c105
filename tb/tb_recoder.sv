// tb_recoder: checks Q_j and the selector controls of all eight groups
// against an independent model: Q_j from the bit weights of the five-bit
// group, U_j from the mapping table (written out below as a list), V_j =
// Q_j - U_j. y[11:0] runs through all values so every group pattern, and
// therefore every Q in -8..8, is met; the upper bits are random.
module tb_recoder;
  import sd_pkg::*;
  localparam int N = 32;
  localparam int G = N / 4;
  // U_j for Q_j = -8 .. 8 (mapping table of the recoding).
  localparam int U_TAB [17] = '{0, 1, 2, -1, 0, 1, -2, -1, 0, 1, 2, -1, 0, 1, -2, -1, 0};

  logic [N-1:0]      y;
  pp_ctrl_t          ctrl [G];
  logic signed [4:0] q    [G];
  int checks = 0, failures = 0;
  bit seen [17];

  recoder #(.N(N)) dut (.y, .ctrl, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ybit(input logic [N-1:0] v, input int k);
    return (k < 0) ? 0 : int'(v[k]);
  endfunction

  initial begin
    for (int t = 0; t < 4096 + 2000; t++) begin
      y = (t < 4096) ? {$urandom, 12'b0} | N'(t) : $urandom;
      #1;
      for (int j = 0; j < G; j++) begin
        int eq, eu, ev;
        eq = ybit(y, 4*j-1) + ybit(y, 4*j) + 2*ybit(y, 4*j+1) + 4*ybit(y, 4*j+2) - 8*ybit(y, 4*j+3);
        eu = U_TAB[eq+8];
        ev = eq - eu;
        seen[eq+8] = 1'b1;
        checks++;
        if (int'(q[j]) != eq
            || ctrl[j].u.zero != (eu == 0) || ctrl[j].u.neg != (eu < 0)
            || ctrl[j].u.shift != (eu == 2 || eu == -2)
            || ctrl[j].v.zero != (ev == 0) || ctrl[j].v.neg != (ev < 0)
            || ctrl[j].v.shift != (ev == 8 || ev == -8)
            || !(ev inside {-8, -4, 0, 4, 8})) begin
          failures++;
          $display("FAIL y=%h j=%0d q=%0d (want %0d) ctrl=%b", y, j, q[j], eq, ctrl[j]);
        end
      end
    end
    for (int k = 0; k < 17; k++) begin
      checks++;
      if (!seen[k]) begin failures++; $display("FAIL Q=%0d never produced", k - 8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
