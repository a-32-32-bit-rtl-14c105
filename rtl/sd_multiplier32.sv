// sd_multiplier32: 32 x 32-bit two's complement multiplier built on radix-4
// signed-digit (SD) arithmetic, modelled on a multiple-valued current-mode chip.
//
// Data path (all combinational between the registers):
//   X, Y registers -> ME control gates -> recoder (Y into N/4 digits Q_j in
//   -8..8, each split into U_j + V_j) -> N/4 partial-product generators
//   (Q_j * X as N/2+2 SD digits plus an increment) -> binary tree of parallel
//   SD adders (log2(N/4) = 3 levels, carry moves one digit per level) ->
//   N digit decoders (p+ / p- split) -> SD-to-binary converter (radix-4
//   carry-lookahead subtractor) -> 2N-bit P register -> product selector.
// Interface: ld loads x_in / y_in. A pulse on me of at least one clock runs a
// multiplication: the product is in the P register two clock edges after me
// was first sampled high, precisely at the first edge after me was sampled low
// again (see me_control). psel chooses the low (0) or high (1) half of P on
// p_out. One clock, synchronous active-low reset.
// The digit-level algorithm follows the published chip; the clocking of the
// registers, the ME sampling, the product selector's function and the split
// of each partial product's top digit are this design's choices.
module sd_multiplier32
  import sd_pkg::*;
#(
  parameter int unsigned N = sd_pkg::N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [N-1:0] x_in,
  input  logic [N-1:0] y_in,
  input  logic         me,
  input  logic         psel,
  output logic [N-1:0] p_out
);
  localparam int unsigned G   = N / 4;
  localparam int unsigned PPD = N / 2 + 2;

  logic [N-1:0]      x_q, y_q, y_gated;
  logic              me_q, p_load;
  pp_ctrl_t          ctrl [G];
  logic signed [4:0] q    [G];
  sd_digit_t         pp   [G][PPD];
  sd_digit_t         inc  [G];
  sd_digit_t         sum_inv [N];
  logic [2*N-1:0]    p_pos, p_neg, product, p_reg;

  operand_regs #(.N(N)) u_regs (
    .clk, .rst_n, .ld, .x_in, .y_in, .x_q, .y_q
  );

  me_control #(.N(N)) u_me (
    .clk, .rst_n, .me, .y_q, .y_gated, .me_q, .p_load
  );

  recoder #(.N(N)) u_recoder (
    .y (y_gated), .ctrl, .q
  );

  for (genvar j = 0; j < G; j++) begin : g_ppg
    ppg #(.N(N), .ODD(j % 2 == 1)) u_ppg (
      .x (x_q), .ctrl (ctrl[j]), .pp (pp[j]), .inc (inc[j])
    );
  end

  adder_tree #(.N(N)) u_tree (
    .pp, .inc, .sum_inv
  );

  for (genvar i = 0; i < N; i++) begin : g_dec
    sd_decoder #(.INVERTED(1'b1)) u_dec (
      .d   (sum_inv[i]),
      .pos (p_pos[2*i +: 2]),
      .neg (p_neg[2*i +: 2])
    );
  end

  sd2bin #(.W(2*N)) u_conv (
    .pos (p_pos), .neg (p_neg), .p (product)
  );

  product_reg #(.W(2*N)) u_preg (
    .clk, .rst_n, .load (p_load), .d (product), .q (p_reg)
  );

  product_selector #(.N(N)) u_sel (
    .sel (psel), .p (p_reg), .p_out
  );
endmodule
