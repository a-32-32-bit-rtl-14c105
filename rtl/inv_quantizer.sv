// inv_quantizer: inverted quantizer with a dynamic range of -2..2.
//
// The SDFA hands on its intermediate sum in inverted form and without level
// restoration. This cell restores the level and the polarity, y = -x.
// Structure: a bidirectional current input circuit splits x into x+ and x-;
// on each side two threshold detectors TD(1,1) and TD(2,1) re-create the
// level (0, 1 or 2 unit currents, so anything beyond 2 is clipped to 2), and
// the wired sum q- - q+ delivers the restored level with reversed sign.
// Combinational.
module inv_quantizer
  import sd_pkg::*;
(
  input  sd_digit_t x,
  output sd_digit_t y
);
  ulevel_t xp, xn, p1, p2, n1, n2;

  bdci u_in (.z(x), .pos(xp), .neg(xn));

  threshold_detector #(.T(1), .M(1)) u_td_p1 (.x(xp), .y(p1));
  threshold_detector #(.T(2), .M(1)) u_td_p2 (.x(xp), .y(p2));
  threshold_detector #(.T(1), .M(1)) u_td_n1 (.x(xn), .y(n1));
  threshold_detector #(.T(2), .M(1)) u_td_n2 (.x(xn), .y(n2));

  assign y = sd_digit_t'({1'b0, n1}) + sd_digit_t'({1'b0, n2})
           - sd_digit_t'({1'b0, p1}) - sd_digit_t'({1'b0, p2});
endmodule
