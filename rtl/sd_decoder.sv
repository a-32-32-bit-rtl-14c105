// sd_decoder: splits one radix-4 signed digit into its two unsigned parts.
//
//   p >= 0 : p+ = p,  p- = 0
//   p <  0 : p+ = 0,  p- = -p          (p+, p- in {0..3}, two bits each)
// A bidirectional current input circuit does the split; its outputs are
// binary-coded levels. With INVERTED = 1 the input is the negated digit, as
// delivered by the unquantized last adder level, and the two sides swap
// roles. Combinational; an assertion checks the digit set.
module sd_decoder
  import sd_pkg::*;
#(
  parameter bit INVERTED = 1'b1
) (
  input  sd_digit_t  d,
  output logic [1:0] pos,
  output logic [1:0] neg
);
  ulevel_t dp, dn;

  bdci u_split (.z(d), .pos(dp), .neg(dn));

  assign pos = INVERTED ? dn[1:0] : dp[1:0];
  assign neg = INVERTED ? dp[1:0] : dn[1:0];

  always_comb
    assert (d >= -4'sd3 && d <= 4'sd3)
      else $error("sd_decoder: digit %0d outside -3..3", d);
endmodule
