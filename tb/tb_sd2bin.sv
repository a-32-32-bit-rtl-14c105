// tb_sd2bin: checks the SD-to-binary converter, p = pos - neg modulo 2^64,
// on corner cases (borrow through every digit, zero, all ones) and random
// operands.
module tb_sd2bin;
  logic [63:0] pos, neg, p;
  int checks = 0, failures = 0;

  sd2bin #(.W(64)) dut (.pos, .neg, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] a, input logic [63:0] b);
    pos = a;
    neg = b;
    #1;
    checks++;
    if (p !== a - b) begin
      failures++;
      $display("FAIL %h - %h = %h got %h", a, b, a - b, p);
    end
  endtask

  initial begin
    check(64'd0, 64'd0);
    check(64'd0, 64'd1);
    check(64'd1, 64'd0);
    check(64'h8000_0000_0000_0000, 64'd1);
    check(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF);
    check(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA);
    check(64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555);
    for (int i = 0; i < 64; i++) check(64'd1 << i, 64'd1);
    for (int i = 0; i < 5000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
