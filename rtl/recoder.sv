// recoder: radix-16 recoding of the multiplier Y into data-selector controls.
//
// Y (two's complement, N bits, N a multiple of 8) is cut into N/4 groups of
// five bits, neighbouring groups sharing one bit (y_-1 = 0):
//   Q_j = y(4j-1) + y(4j) + 2 y(4j+1) + 4 y(4j+2) - 8 y(4j+3),  Q_j in -8..8
// so that Y = sum Q_j 16^j. Each Q_j is split as Q_j = U_j + V_j with
// U_j in {-2..2} and V_j in {-8,-4,0,4,8} following the published mapping
// table (V_j is Q_j rounded to a multiple of 4; +-2 and +-6 round away from
// zero on the V side, e.g. 6 = 8 - 2, -6 = -8 + 2, 2 = 0 + 2).
// Outputs per group: the zero / complement / shift controls of U_j*X and
// V_j*X (pp_ctrl_t) and Q_j itself. Combinational.
module recoder
  import sd_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]       y,
  output pp_ctrl_t           ctrl [N/4],
  output logic signed [4:0]  q    [N/4]
);
  localparam int unsigned G = N / 4;

  // Extended multiplier with y_-1 = 0 at bit 0.
  logic [N:0] ye;
  assign ye = {y, 1'b0};

  for (genvar j = 0; j < G; j++) begin : g_grp
    logic [4:0] grp;
    logic signed [4:0] u, v;
    assign grp = ye[4*j +: 5];   // {y4j+3, y4j+2, y4j+1, y4j, y4j-1}

    always_comb begin
      q[j] = $signed(5'(grp[0]) + 5'(grp[1]) + 5'({grp[2], 1'b0})
                   + 5'({grp[3], 2'b00}) - 5'({grp[4], 3'b000}));
      // Table I: V_j = 4 * round(Q_j / 4), halves away from zero only for
      // |Q_j| = 6; |Q_j| = 2 stays on the U side.
      unique case (q[j])
        -5'sd8, -5'sd7, -5'sd6: v = -5'sd8;
        -5'sd5, -5'sd4, -5'sd3: v = -5'sd4;
         5'sd3,  5'sd4,  5'sd5: v =  5'sd4;
         5'sd6,  5'sd7,  5'sd8: v =  5'sd8;
        default:                v =  5'sd0;
      endcase
      u = q[j] - v;

      ctrl[j].u.zero  = (u == 5'sd0);
      ctrl[j].u.neg   = u[4];
      ctrl[j].u.shift = (u == 5'sd2) || (u == -5'sd2);
      ctrl[j].v.zero  = (v == 5'sd0);
      ctrl[j].v.neg   = v[4];
      ctrl[j].v.shift = (v == 5'sd8) || (v == -5'sd8);
    end
  end
endmodule
