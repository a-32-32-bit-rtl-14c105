// tb_sd_multiplier32: end-to-end test of the 32 x 32-bit SD multiplier at its
// default size.
// Each multiplication loads X and Y with ld, pulses ME for 1..3 clocks and
// reads both halves of the product through the product selector. The result
// is compared with the 64-bit two's complement product computed here, and
// the P register must change exactly at the first clock edge that samples ME
// low, and not before. Vectors: corner cases (0, +-1, most negative and most
// positive operands, the 00000100h x 80000000h pair used to measure the
// multiply time), then random operands, some with a single ld-only step to
// show that P holds without an ME pulse.
// Mechanisms counted, each must occur: the control gates forcing the array
// output to 0 while ME is low, ME pulses of one and of several clocks, a P
// hold without ME, every recoded digit Q_j in -8..8, nonzero increments of
// both signs, a carry into the split top digit of a partial product, and
// both selector halves. The top digit of every SD product must lie in
// {-1, 0, 1}.
module tb_sd_multiplier32;
  import sd_pkg::*;
  logic        clk = 1'b0, rst_n, ld, me, psel;
  logic [31:0] x_in, y_in, p_out;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_gated = 0, n_me1 = 0, n_melong = 0, n_hold = 0, n_inc_pos = 0, n_inc_neg = 0;
  int n_topcarry = 0, n_lo = 0, n_hi = 0;
  int q_seen [17];

  sd_multiplier32 dut (.clk, .rst_n, .ld, .x_in, .y_in, .me, .psel, .p_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe internal mechanisms while the array is enabled or gated.
  always @(negedge clk) if (rst_n) begin
    if (!dut.me_q && dut.product == 64'd0) n_gated++;
    if (!dut.me_q && dut.product != 64'd0) begin
      failures++;
      $display("FAIL array output %h while ME is low", dut.product);
    end
    if (dut.p_load) begin
      // The most significant product digit stays in {-1, 0, 1}.
      checks++;
      if (dut.sum_inv[31] < -4'sd1 || dut.sum_inv[31] > 4'sd1) begin
        failures++;
        $display("FAIL top product digit %0d", -dut.sum_inv[31]);
      end
      for (int j = 0; j < 8; j++) begin
        q_seen[int'(dut.q[j]) + 8]++;
        if (dut.inc[j] > 4'sd0) n_inc_pos++;
        if (dut.inc[j] < 4'sd0) n_inc_neg++;
        if (dut.pp[j][17] != 4'sd0) n_topcarry++;
      end
    end
  end

  task automatic read_product(output logic [63:0] p);
    psel = 1'b0;
    #1;
    p[31:0] = p_out;
    n_lo++;
    psel = 1'b1;
    #1;
    p[63:32] = p_out;
    n_hi++;
  endtask

  // One multiplication with an ME pulse of len clocks.
  task automatic multiply(input logic [31:0] a, input logic [31:0] b, input int len);
    logic [63:0] want, p_prev, now;
    @(posedge clk);
    #1;
    ld = 1'b1; x_in = a; y_in = b;
    @(posedge clk);
    #1;
    ld = 1'b0; x_in = $urandom; y_in = $urandom;
    read_product(p_prev);
    me = 1'b1;
    for (int k = 0; k < len; k++) begin
      @(posedge clk);
      #1;
      read_product(now);
      checks++;
      if (now !== p_prev) begin
        failures++;
        $display("FAIL P changed while ME high (cycle %0d of pulse)", k);
      end
    end
    me = 1'b0;
    if (len == 1) n_me1++; else n_melong++;
    @(posedge clk);
    #1;
    read_product(now);
    want = 64'($signed(a)) * 64'($signed(b));
    checks++;
    if (now !== want) begin
      failures++;
      $display("FAIL %h * %h = %h got %h", a, b, want, now);
    end
  endtask

  // Load new operands without an ME pulse: P must hold.
  task automatic load_only();
    logic [63:0] p_prev, now;
    read_product(p_prev);
    @(posedge clk);
    #1;
    ld = 1'b1; x_in = $urandom; y_in = $urandom;
    repeat (3) begin
      @(posedge clk);
      #1;
      ld = 1'b0;
    end
    read_product(now);
    checks++;
    n_hold++;
    if (now !== p_prev) begin
      failures++;
      $display("FAIL P changed without ME: %h -> %h", p_prev, now);
    end
  endtask

  localparam logic [31:0] CORNER [10] = '{32'h0000_0000, 32'h0000_0001, 32'hFFFF_FFFF,
    32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_0100, 32'h5555_5555, 32'hAAAA_AAAA,
    32'h0000_002A, 32'hFFFF_FFFB};

  initial begin
    rst_n = 1'b0; ld = 1'b0; me = 1'b0; psel = 1'b0; x_in = '0; y_in = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // Multiply-time measurement vector: X = 00000100h, Y = 80000000h.
    multiply(32'h0000_0100, 32'h8000_0000, 1);
    // -5 * 42 = -210.
    multiply(32'hFFFF_FFFB, 32'h0000_002A, 2);
    foreach (CORNER[i])
      foreach (CORNER[k])
        multiply(CORNER[i], CORNER[k], 1 + ((i + k) % 3));
    for (int t = 0; t < 3000; t++) begin
      if (t % 100 == 7) load_only();
      multiply($urandom, $urandom, 1 + ($urandom % 3));
    end
    // Every mechanism must have happened.
    checks++;
    if (n_gated == 0 || n_me1 == 0 || n_melong == 0 || n_hold == 0 || n_inc_pos == 0
        || n_inc_neg == 0 || n_topcarry == 0 || n_lo == 0 || n_hi == 0) begin
      failures++;
      $display("FAIL mechanism missing: gated=%0d me1=%0d melong=%0d hold=%0d inc+=%0d inc-=%0d topcarry=%0d lo=%0d hi=%0d",
               n_gated, n_me1, n_melong, n_hold, n_inc_pos, n_inc_neg, n_topcarry, n_lo, n_hi);
    end
    for (int v = 0; v < 17; v++) begin
      checks++;
      if (q_seen[v] == 0) begin failures++; $display("FAIL Q=%0d never used", v - 8); end
    end
    $display("mechanisms: gated=%0d me1=%0d melong=%0d hold=%0d inc+=%0d inc-=%0d topcarry=%0d lo=%0d hi=%0d",
             n_gated, n_me1, n_melong, n_hold, n_inc_pos, n_inc_neg, n_topcarry, n_lo, n_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
