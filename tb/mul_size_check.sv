// mul_size_check: drives one sd_multiplier32 instance of word length N
// through VECTORS multiplications (all operand pairs when N = 8, random
// ones otherwise) and compares each 2N-bit product with the product computed
// here. It also checks that the adder tree has ceil(log2(N/4)) levels, the
// number of SD adder stages the recoding needs. Reports its counts when done.
module mul_size_check #(
  parameter int unsigned N       = 16,
  parameter int unsigned VECTORS = 1000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  logic         rst_n = 1'b0, ld = 1'b0, me = 1'b0, psel = 1'b0;
  logic [N-1:0] x_in = '0, y_in = '0, p_out;

  sd_multiplier32 #(.N(N)) dut (.clk, .rst_n, .ld, .x_in, .y_in, .me, .psel, .p_out);

  initial begin
    logic [N-1:0]   a, b;
    logic [2*N-1:0] want, got;
    done = 1'b0;
    checks = 0;
    failures = 0;
    checks++;
    if (dut.u_tree.LEVELS != $clog2(N / 4)) begin
      failures++;
      $display("FAIL N=%0d: %0d adder levels", N, dut.u_tree.LEVELS);
    end
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < VECTORS; t++) begin
      if (N == 8) begin
        a = N'(t);
        b = N'(t >> 8);
      end else begin
        a = N'({$urandom, $urandom});
        b = N'({$urandom, $urandom});
      end
      ld = 1'b1; x_in = a; y_in = b;
      @(posedge clk);
      #1;
      ld = 1'b0; me = 1'b1;
      @(posedge clk);
      #1;
      me = 1'b0;
      @(posedge clk);
      #1;
      psel = 1'b0;
      #1;
      got[N-1:0] = p_out;
      psel = 1'b1;
      #1;
      got[2*N-1:N] = p_out;
      want = (2*N)'($signed(a)) * (2*N)'($signed(b));
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d: %h * %h = %h got %h", N, a, b, want, got);
      end
    end
    done = 1'b1;
  end
endmodule
