// tb_sd_decoder: exhaustive check of the digit decoder, plain and inverted:
// for a digit p, p+ = max(p,0) and p- = max(-p,0).
module tb_sd_decoder;
  import sd_pkg::*;
  sd_digit_t d;
  logic [1:0] pos_t, neg_t, pos_i, neg_i;
  int checks = 0, failures = 0;

  sd_decoder #(.INVERTED(1'b0)) dut_t (.d(d),  .pos(pos_t), .neg(neg_t));
  sd_decoder #(.INVERTED(1'b1)) dut_i (.d(-d), .pos(pos_i), .neg(neg_i));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -3; v <= 3; v++) begin
      int ep, en;
      d = sd_digit_t'(v);
      #1;
      ep = (v > 0) ? v : 0;
      en = (v < 0) ? -v : 0;
      checks += 2;
      if (int'(pos_t) != ep || int'(neg_t) != en) begin
        failures++;
        $display("FAIL plain d=%0d pos=%0d neg=%0d", v, pos_t, neg_t);
      end
      if (int'(pos_i) != ep || int'(neg_i) != en) begin
        failures++;
        $display("FAIL inverted d=%0d pos=%0d neg=%0d", v, pos_i, neg_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
