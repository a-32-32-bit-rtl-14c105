// threshold_detector: TD(T, M).
//
// Compares a single-directional input current x with the threshold T unit
// currents and delivers M unit currents when x >= T, nothing otherwise. On
// the chip a voltage-switched current source is switched by the comparison.
// T and M are set per instance. Combinational.
module threshold_detector
  import sd_pkg::*;
#(
  parameter int unsigned T = 1,
  parameter int unsigned M = 1
) (
  input  ulevel_t x,
  output ulevel_t y
);
  assign y = (x >= ulevel_t'(T)) ? ulevel_t'(M) : 3'd0;
endmodule
