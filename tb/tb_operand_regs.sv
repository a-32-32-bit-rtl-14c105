// tb_operand_regs: reset clears X and Y, ld loads both at the next rising
// edge, and both hold while ld is low.
module tb_operand_regs;
  logic        clk = 1'b0, rst_n, ld;
  logic [31:0] x_in, y_in, x_q, y_q, mx, my;
  int checks = 0, failures = 0;

  operand_regs #(.N(32)) dut (.clk, .rst_n, .ld, .x_in, .y_in, .x_q, .y_q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    ld    = 1'b1;
    x_in  = 32'h1234_5678;
    y_in  = 32'h9ABC_DEF0;
    @(posedge clk);
    #1;
    checks++;
    if (x_q !== 0 || y_q !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    mx = '0;
    my = '0;
    for (int i = 0; i < 300; i++) begin
      ld   = $urandom % 2;
      x_in = $urandom;
      y_in = $urandom;
      @(posedge clk);
      if (ld) begin mx = x_in; my = y_in; end
      #1;
      checks++;
      if (x_q !== mx || y_q !== my) begin
        failures++;
        $display("FAIL cycle %0d x=%h y=%h want %h %h", i, x_q, y_q, mx, my);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
