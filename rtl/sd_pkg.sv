// sd_pkg: types and constants shared by the radix-4 signed-digit (SD) multiplier.
//
// In the silicon version every radix-4 digit is a bidirectional current: its
// magnitude is a multiple of a unit current and its direction is the sign.
// Here the same quantity is coded as a small two's complement integer, one
// unit current = 1. A 4-bit digit holds every level the circuits carry: the
// SD digits themselves (-3..3) and the linear sums in front of an SDFA (-6..6).
//
// pp_ctrl_t is the bundle of data-selector controls that the recoder sends to
// one partial-product generator: zero / complement / shift for U_j*X and for
// V_j*X. The encoding is this design's choice.
package sd_pkg;

  // Operand word length of the main configuration (32 x 32 bits).
  localparam int unsigned N_DEFAULT = 32;

  // One radix-4 signed digit or a linear sum of digits (a bidirectional
  // current).
  typedef logic signed [3:0] sd_digit_t;

  // A single-directional current level, 0..7 unit currents.
  typedef logic [2:0] ulevel_t;

  // Selector controls of one multiple (U_j*X or V_j*X).
  typedef struct packed {
    logic zero;   // multiple is 0
    logic neg;    // multiple is negative: complement X, increment signal set
    logic shift;  // U: 0 -> 1X, 1 -> 2X ; V: 0 -> 4X, 1 -> 8X
  } mult_sel_t;

  // Controls of one partial-product generator: Q_j = U_j + V_j.
  typedef struct packed {
    mult_sel_t u;
    mult_sel_t v;
  } pp_ctrl_t;

endpackage
