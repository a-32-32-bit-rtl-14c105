// sdfa: signed-digit full adder of the radix-4 SD adder.
//
// Input is the linear sum z = x_i + y_i of two SD digits (formed on a wire in
// current mode). The cell splits it as 4*c + w = z:
//   z >=  2 : c =  1, w = z - 4
//  -1..1    : c =  0, w = z
//   z <= -2 : c = -1, w = z + 4
// so that c is in {-1,0,1} and w in {-2..2} for every z in {-6..6}.
// Structure: a bidirectional current input circuit splits z into z+ and z-;
// threshold detectors TD(2,1) on each side give the carry parts c+ and c-,
// and c = c+ - c- (wired sum). Mirrors scale c+ and c- by 4, and the wired
// sum 4c+ - 4c- - z gives the intermediate sum in inverted form,
// w_inv = -w, as in the published cell; an inverted quantizer restores the
// polarity downstream. Combinational. An assertion checks the input range.
module sdfa
  import sd_pkg::*;
(
  input  sd_digit_t z,
  output sd_digit_t c,
  output sd_digit_t w_inv
);
  ulevel_t   zp, zn, cp, cn;
  sd_digit_t cp4, cn4;

  bdci u_in (.z(z), .pos(zp), .neg(zn));

  threshold_detector #(.T(2), .M(1)) u_td_p (.x(zp), .y(cp));
  threshold_detector #(.T(2), .M(1)) u_td_n (.x(zn), .y(cn));

  current_mirror #(.GAIN(4), .INVERT(1'b0)) u_m_p (.x(cp), .y(cp4));
  current_mirror #(.GAIN(4), .INVERT(1'b1)) u_m_n (.x(cn), .y(cn4));

  assign c     = sd_digit_t'({1'b0, cp}) - sd_digit_t'({1'b0, cn});
  assign w_inv = cp4 + cn4 - z;

  // Dynamic range of the SDFA input: -6..6.
  always_comb
    assert (z >= -4'sd6 && z <= 4'sd6)
      else $error("sdfa: linear sum %0d outside -6..6", z);
endmodule
