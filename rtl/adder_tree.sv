// adder_tree: binary tree of parallel SD adders that sums the partial products.
//
// The N/4 partial products P_j (each N/2+2 radix-4 digits) weigh 16^j, so P_j
// starts at digit 2j of the product. Level 1 adds the pairs P_2k + P_2k+1 and
// takes in the increment signals of both groups at the digits where each
// group starts; level 2 adds neighbouring level-1 sums, and so on until one
// operand is left: log2(N/4) levels, three for N = 32 (4 + 2 + 1 adders).
// Every adder here is N digits wide with its operands placed at their
// absolute digit positions; positions that only ever see zeros are constant.
// Digits at and above position N only carry multiples of 4^N = 2^(2N), which
// vanish in the 2N-bit two's complement product, so they are not kept.
// The last level is built without inverted quantizers (INV_OUT): its result
// sum_inv holds the product digits with their sign flipped.
// Combinational.
module adder_tree
  import sd_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  sd_digit_t pp      [N/4][N/2+2],
  input  sd_digit_t inc     [N/4],
  output sd_digit_t sum_inv [N]
);
  localparam int unsigned G      = N / 4;
  localparam int unsigned LEVELS = $clog2(G);
  localparam int unsigned PPD    = N / 2 + 2;

  // N must be a multiple of 8 and give a power-of-two number of operands.
  if (N % 8 != 0 || (1 << LEVELS) != G) begin : g_bad_n
    $error("adder_tree: N/4 must be a power of two and N a multiple of 8");
  end

  sd_digit_t zero [N];
  assign zero = '{default: '0};

  // Partial products placed at their absolute digit positions.
  sd_digit_t placed [G][N];
  for (genvar j = 0; j < G; j++) begin : g_place
    for (genvar d = 0; d < N; d++) begin : g_dig
      if (d >= 2*j && d - 2*j < PPD) begin : g_on
        assign placed[j][d] = pp[j][d-2*j];
      end else begin : g_off
        assign placed[j][d] = '0;
      end
    end
  end

  // g_lvl[l].s[k]: output of adder k of level l.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NA = G >> (l+1);
    sd_digit_t opnd [2*NA][N];
    sd_digit_t s    [NA][N];
    if (l == 0) begin : g_in0
      assign opnd = placed;
    end else begin : g_inl
      assign opnd = g_lvl[l-1].s;
    end
    for (genvar k = 0; k < NA; k++) begin : g_add
      sd_digit_t inc_v [N];
      if (l == 0) begin : g_inc
        // d_j + e_j of groups 2k and 2k+1 enter at digits 4k and 4k+2.
        for (genvar d = 0; d < N; d++) begin : g_dig
          if (d == 4*k) begin : g_e
            assign inc_v[d] = inc[2*k];
          end else if (d == 4*k + 2) begin : g_o
            assign inc_v[d] = inc[2*k+1];
          end else begin : g_z
            assign inc_v[d] = '0;
          end
        end
      end else begin : g_noinc
        assign inc_v = zero;
      end
      psda #(.DIGITS(N), .INV_OUT(l == LEVELS-1)) u_psda (
        .x   (opnd[2*k]),
        .y   (opnd[2*k+1]),
        .inc (inc_v),
        .s   (s[k])
      );
    end
  end

  assign sum_inv = g_lvl[LEVELS-1].s[0];
endmodule
