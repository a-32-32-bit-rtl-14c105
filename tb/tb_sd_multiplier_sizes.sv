// tb_sd_multiplier_sizes: the multiplier at other word lengths. N = 8 runs
// all 65536 operand pairs (one of them is -5 x 42 = -210), N = 16 and N = 64
// run random operands; each instance also checks its number of adder levels
// (1, 2 and 4 levels).
module tb_sd_multiplier_sizes;
  logic clk = 1'b0;
  logic d8, d16, d64;
  int   c8, c16, c64, f8, f16, f64;
  int   checks, failures;

  always #5 clk = ~clk;

  mul_size_check #(.N(8),  .VECTORS(65536)) u8  (.clk, .done(d8),  .checks(c8),  .failures(f8));
  mul_size_check #(.N(16), .VECTORS(20000)) u16 (.clk, .done(d16), .checks(c16), .failures(f16));
  mul_size_check #(.N(64), .VECTORS(5000))  u64 (.clk, .done(d64), .checks(c64), .failures(f64));

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c64, f8 + f16 + f64 + 1);
    $finish;
  end

  initial begin
    wait (d8 && d16 && d64);
    checks   = c8 + c16 + c64;
    failures = f8 + f16 + f64;
    $display("N=8: %0d checks, N=16: %0d checks, N=64: %0d checks", c8, c16, c64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
