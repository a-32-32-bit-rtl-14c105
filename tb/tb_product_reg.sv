// tb_product_reg: reset clears the register, a load strobe takes the input at
// the next rising edge, and the register holds while the strobe is low.
module tb_product_reg;
  logic        clk = 1'b0, rst_n, load;
  logic [63:0] d, q, model;
  int checks = 0, failures = 0;

  product_reg #(.W(64)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    load  = 1'b1;
    d     = 64'hDEAD_BEEF_0123_4567;
    @(posedge clk);
    #1;
    checks++;
    if (q !== 64'd0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      load = ($urandom % 3) == 0;
      d    = {$urandom, $urandom};
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h want %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
