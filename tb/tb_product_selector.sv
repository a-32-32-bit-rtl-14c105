// tb_product_selector: both halves of random 64-bit products must appear on
// the 32-bit output for the matching select value.
module tb_product_selector;
  logic        sel;
  logic [63:0] p;
  logic [31:0] p_out;
  int checks = 0, failures = 0;

  product_selector #(.N(32)) dut (.sel, .p, .p_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      p   = {$urandom, $urandom};
      sel = i[0];
      #1;
      checks++;
      if (p_out !== (sel ? p[63:32] : p[31:0])) begin
        failures++;
        $display("FAIL sel=%0b p=%h out=%h", sel, p, p_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
