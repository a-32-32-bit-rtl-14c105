// psda: parallel radix-4 signed-digit adder.
//
// For every digit position i:
//   z_i = x_i + y_i + inc_i            (wired summation)
//   4*c_i + w_i = z_i                  (SDFA, w handed on inverted)
//   s_i = w_i + c_(i-1)                (wired summation)
// The carry moves one position only, so the delay does not depend on DIGITS.
// inc carries extra small terms into the linear sum; the first tree level
// uses it for the increment signals of the partial-product generators, the
// other levels tie it to 0.
//
// INV_OUT = 0: the inverted intermediate sum goes through an inverted
// quantizer and s is delivered with true polarity.
// INV_OUT = 1: no quantizer; the adder delivers -s_i = w_inv_i + (-c_(i-1)).
// The last level of the multiplier tree works this way (the published delay
// sum counts three SDFAs but two quantizers); its decoders undo the sign.
// The carry out of the top digit is dropped: callers size DIGITS so that it
// only carries multiples of 4^DIGITS. Combinational.
module psda
  import sd_pkg::*;
#(
  parameter int unsigned DIGITS  = 32,
  parameter bit          INV_OUT = 1'b0
) (
  input  sd_digit_t x   [DIGITS],
  input  sd_digit_t y   [DIGITS],
  input  sd_digit_t inc [DIGITS],
  output sd_digit_t s   [DIGITS]
);
  sd_digit_t z     [DIGITS];
  sd_digit_t c     [DIGITS];
  sd_digit_t w_inv [DIGITS];

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    assign z[i] = x[i] + y[i] + inc[i];
    sdfa u_sdfa (.z(z[i]), .c(c[i]), .w_inv(w_inv[i]));

    sd_digit_t c_in;
    if (i == 0) begin : g_lsd
      assign c_in = '0;
    end else begin : g_mid
      assign c_in = c[i-1];
    end

    if (INV_OUT) begin : g_inv
      assign s[i] = w_inv[i] - c_in;
    end else begin : g_q
      sd_digit_t w;
      inv_quantizer u_q (.x(w_inv[i]), .y(w));
      assign s[i] = w + c_in;
    end
  end
endmodule
