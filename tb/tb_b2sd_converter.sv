// tb_b2sd_converter: random selector bit patterns into the even and the odd
// converter. The weighted value of the output digits must equal the signed
// value of the bits (even: +2^i for a_i, b_i, -2^N for a_N, -2^(N+2) for
// b_(N+2); odd: all signs flipped); digits must lie in -1..3 (even) or -3..1
// (odd) below the top two, and in -2..2 / -1..1 for the top two.
module tb_b2sd_converter;
  import sd_pkg::*;
  localparam int N = 32;
  localparam int D = N / 2 + 2;
  logic [N:0]   a_bits;
  logic [N+2:0] b_bits;
  sd_digit_t    pe [D], po [D];
  int checks = 0, failures = 0;

  b2sd_converter #(.N(N), .ODD(1'b0)) dut_e (.a_bits, .b_bits, .pp(pe));
  b2sd_converter #(.N(N), .ODD(1'b1)) dut_o (.a_bits, .b_bits, .pp(po));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint ref_v, ve, vo;
      bit ok_e, ok_o;
      a_bits = (t == 0) ? '1 : (t == 1) ? '0 : {$urandom, $urandom};
      b_bits = (t == 0) ? '1 : (t == 1) ? '0 : {$urandom, $urandom};
      #1;
      ref_v = 0;
      for (int i = 0; i < N; i++)   ref_v += longint'(a_bits[i]) <<< i;
      for (int i = 0; i < N+2; i++) ref_v += longint'(b_bits[i]) <<< i;
      ref_v -= longint'(a_bits[N]) <<< N;
      ref_v -= longint'(b_bits[N+2]) <<< (N+2);
      ve = 0; vo = 0; ok_e = 1'b1; ok_o = 1'b1;
      for (int i = D-1; i >= 0; i--) begin
        ve = ve * 4 + longint'(pe[i]);
        vo = vo * 4 + longint'(po[i]);
        if (i < D-2) begin
          if (pe[i] < -4'sd1 || pe[i] > 4'sd3) ok_e = 1'b0;
          if (po[i] < -4'sd3 || po[i] > 4'sd1) ok_o = 1'b0;
        end else begin
          if (pe[i] < -4'sd2 || pe[i] > 4'sd2 || po[i] < -4'sd2 || po[i] > 4'sd2) begin
            ok_e = 1'b0;
          end
        end
      end
      checks += 2;
      if (ve != ref_v || !ok_e) begin
        failures++;
        $display("FAIL even a=%h b=%h value=%0d want %0d", a_bits, b_bits, ve, ref_v);
      end
      if (vo != -ref_v || !ok_o) begin
        failures++;
        $display("FAIL odd a=%h b=%h value=%0d want %0d", a_bits, b_bits, vo, -ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
