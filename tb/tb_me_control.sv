// tb_me_control: ME is sampled each clock; the gated Y equals Y only while
// the sampled ME is high and is 0 otherwise; the P load strobe is high
// exactly in the cycles where the sampled ME is high and ME is low (falling
// edge of ME). Random ME sequences with pulses of one and more cycles.
module tb_me_control;
  logic        clk = 1'b0, rst_n, me, me_q, p_load;
  logic [31:0] y_q, y_gated;
  logic        me_model;
  int checks = 0, failures = 0, strobes = 0;

  me_control #(.N(32)) dut (.clk, .rst_n, .me, .y_q, .y_gated, .me_q, .p_load);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    me    = 1'b1;
    y_q   = 32'hFFFF_FFFF;
    @(posedge clk);
    #1;
    rst_n    = 1'b1;
    me_model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      me  = ($urandom % 3) != 0;
      y_q = $urandom;
      #1;
      checks++;
      if (me_q !== me_model || y_gated !== (me_model ? y_q : 32'd0)
          || p_load !== (me_model && !me)) begin
        failures++;
        $display("FAIL cycle %0d me=%0b me_q=%0b y_gated=%h p_load=%0b", i, me, me_q, y_gated, p_load);
      end
      if (p_load) strobes++;
      @(posedge clk);
      me_model = me;
      #1;
    end
    checks++;
    if (strobes == 0) begin failures++; $display("FAIL no ME falling edge seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
