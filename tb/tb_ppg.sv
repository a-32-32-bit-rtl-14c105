// tb_ppg: every recoded digit Q in -8..8 with random and corner multiplicands
// (0, -1, most negative, most positive) through an even and an odd
// partial-product generator. The value of the digits plus the increment
// must equal Q*X; digits and increments must stay inside the ranges the
// adder tree relies on.
module tb_ppg;
  import sd_pkg::*;
  localparam int N = 32;
  localparam int D = N / 2 + 2;
  localparam int U_TAB [17] = '{0, 1, 2, -1, 0, 1, -2, -1, 0, 1, 2, -1, 0, 1, -2, -1, 0};

  logic [N-1:0] x;
  pp_ctrl_t     ctrl;
  sd_digit_t    pe [D], po [D], ie, io;
  int checks = 0, failures = 0;

  ppg #(.N(N), .ODD(1'b0)) dut_e (.x, .ctrl, .pp(pe), .inc(ie));
  ppg #(.N(N), .ODD(1'b1)) dut_o (.x, .ctrl, .pp(po), .inc(io));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6000; t++) begin
      int qv, uv, vv;
      longint want, ve, vo;
      bit ok;
      qv = (t % 17) - 8;
      uv = U_TAB[qv + 8];
      vv = qv - uv;
      ctrl.u.zero  = (uv == 0);
      ctrl.u.neg   = (uv < 0);
      ctrl.u.shift = (uv == 2 || uv == -2);
      ctrl.v.zero  = (vv == 0);
      ctrl.v.neg   = (vv < 0);
      ctrl.v.shift = (vv == 8 || vv == -8);
      case (t / 17)
        0: x = 32'h0000_0000;
        1: x = 32'hFFFF_FFFF;
        2: x = 32'h8000_0000;
        3: x = 32'h7FFF_FFFF;
        default: x = $urandom;
      endcase
      #1;
      want = longint'(qv) * longint'($signed(x));
      ve = 0; vo = 0; ok = 1'b1;
      for (int i = D-1; i >= 0; i--) begin
        ve = ve * 4 + longint'(pe[i]);
        vo = vo * 4 + longint'(po[i]);
        if (i < D-2 && (pe[i] < -4'sd1 || pe[i] > 4'sd3 || po[i] < -4'sd3 || po[i] > 4'sd1)) ok = 1'b0;
        if (i >= D-2 && (pe[i] < -4'sd2 || pe[i] > 4'sd2 || po[i] < -4'sd2 || po[i] > 4'sd2)) ok = 1'b0;
      end
      if (ie < 4'sd0 || ie > 4'sd2 || io < -4'sd2 || io > 4'sd0) ok = 1'b0;
      checks += 2;
      if (ve + longint'(ie) != want || !ok) begin
        failures++;
        $display("FAIL even Q=%0d X=%h value=%0d want %0d inc=%0d", qv, x, ve + longint'(ie), want, ie);
      end
      if (vo + longint'(io) != want || !ok) begin
        failures++;
        $display("FAIL odd Q=%0d X=%h value=%0d want %0d inc=%0d", qv, x, vo + longint'(io), want, io);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
