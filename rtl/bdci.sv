// bdci: bidirectional current input circuit.
//
// Splits a bidirectional current z (a signed level) into two
// single-directional currents: pos = z for z > 0, neg = -z for z < 0, the
// other output 0. In the current-mode circuit the input node settles above or
// below VDD/2 depending on the direction of z, and mirrors copy out the
// current on the matching side. With integer-coded levels it is a sign test.
// Valid for |z| <= 7. Combinational.
module bdci
  import sd_pkg::*;
(
  input  sd_digit_t z,
  output ulevel_t   pos,
  output ulevel_t   neg
);
  sd_digit_t mag;
  always_comb begin
    mag = z[3] ? -z : z;
    pos = z[3] ? 3'd0 : mag[2:0];
    neg = z[3] ? mag[2:0] : 3'd0;
  end

  always_comb
    assert (z != -4'sd8) else $error("bdci: level -8 out of range");
endmodule
