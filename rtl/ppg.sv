// ppg: partial-product generator for one recoded group j of the multiplier.
//
// Q_j * X is built as A_j + B_j with A_j = U_j*X (U in {-2..2}) and
// B_j = V_j*X (V in {-8,-4,0,4,8}). Data selectors controlled by the recoder
// shift X by 0/1 (A) or 2/3 (B) places and complement it for negative
// multiples; the +1 that completes a two's complement negation is not added
// here but handed on as an increment signal.
//   even group: X = -x_(N-1) 2^(N-1) + sum x_i 2^i. Bits count +1, the top bit
//     -1; a negative multiple complements the bits and sets increment +1.
//   odd group : X = not(x_(N-1)) 2^(N-1) - sum not(x_i) 2^i - 1. Bits count -1,
//     the top bit +1; a positive multiple complements the bits and sets
//     increment -1, a negative one uses X as it is.
// The odd form makes the odd partial products' digits negative-leaning
// ({-3..1}) so that they cancel against the even ones ({-1..3}) and the sum
// of a pair, plus both groups' increments, fits the SDFA range.
// Bits shifted in below bit 0 are 0 before the complement.
// Outputs: pp = the digits of Q_j*X - inc, and inc = d_j + e_j, which the
// first adder level adds at digit 0 of this operand. Combinational.
module ppg
  import sd_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter bit          ODD = 1'b0
) (
  input  logic [N-1:0] x,
  input  pp_ctrl_t     ctrl,
  output sd_digit_t    pp [N/2+2],
  output sd_digit_t    inc
);
  logic [N:0]   a_bits;
  logic [N+2:0] b_bits;
  logic [N-1:0] x_a;        // X shifted for the selected multiple
  logic [N+1:0] x_b;
  logic         cpl_a, cpl_b;
  sd_digit_t    d, e;

  always_comb begin
    x_a = ctrl.u.shift ? {x[N-2:0], 1'b0} : x;
    x_b = ctrl.v.shift ? {x[N-2:0], 3'b000} : {x, 2'b00};
    // Complement select: even groups complement negative multiples, odd
    // groups complement positive ones.
    cpl_a = ODD ? !ctrl.u.neg : ctrl.u.neg;
    cpl_b = ODD ? !ctrl.v.neg : ctrl.v.neg;

    a_bits = '0;
    if (!ctrl.u.zero) begin
      a_bits[N-1:0] = x_a ^ {N{cpl_a}};
      a_bits[N]     = x[N-1] ^ cpl_a;
    end
    b_bits = '0;
    if (!ctrl.v.zero) begin
      b_bits[N+1:0] = x_b ^ {(N+2){cpl_b}};
      b_bits[N+2]   = x[N-1] ^ cpl_b;
    end

    d = '0;
    e = '0;
    if (!ctrl.u.zero && cpl_a) d = ODD ? -4'sd1 : 4'sd1;
    if (!ctrl.v.zero && cpl_b) e = ODD ? -4'sd1 : 4'sd1;
    inc = d + e;
  end

  b2sd_converter #(.N(N), .ODD(ODD)) u_b2sd (
    .a_bits (a_bits),
    .b_bits (b_bits),
    .pp     (pp)
  );
endmodule
