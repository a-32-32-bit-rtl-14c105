// current_mirror: copies a single-directional current, scaled by GAIN and,
// with INVERT = 1, with its direction reversed (an NMOS mirror sinks what a
// PMOS mirror sources). The output is a bidirectional level, so mirrored
// currents can be wire-summed with currents of the other direction. The
// result must stay within -8..7 unit currents; an assertion checks it.
// Combinational.
module current_mirror
  import sd_pkg::*;
#(
  parameter int unsigned GAIN   = 1,
  parameter bit          INVERT = 1'b1
) (
  input  ulevel_t   x,
  output sd_digit_t y
);
  int scaled;
  always_comb begin
    scaled = int'(x) * int'(GAIN);
    y      = sd_digit_t'(INVERT ? -scaled : scaled);
  end

  always_comb
    assert ((INVERT ? -scaled : scaled) >= -8 && (INVERT ? -scaled : scaled) <= 7)
      else $error("current_mirror: output %0d out of range", INVERT ? -scaled : scaled);
endmodule
