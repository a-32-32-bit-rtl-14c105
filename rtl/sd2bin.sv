// sd2bin: SD-to-binary converter, P = P+ - P- in two's complement.
//
// P+ and P- are the positive and negative parts of the SD product, each an
// ordinary radix-4 number (two bits per digit). The difference is formed as
// P+ + not(P-) + 1 with a radix-4 carry-lookahead adder: every digit position
// k produces generate (digit sum >= 4) and propagate (digit sum = 3) signals,
// a parallel-prefix network (Kogge-Stone, log2(W/2) levels) turns them into
// the carry into every digit, and each digit adds its carry in.
// The carry out of the top digit is dropped (arithmetic modulo 2^W).
// Combinational.
module sd2bin #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] pos,
  input  logic [W-1:0] neg,
  output logic [W-1:0] p
);
  localparam int unsigned K      = W / 2;
  localparam int unsigned STAGES = $clog2(K);

  logic [W-1:0] b;
  logic [K-1:0] g0, p0;
  logic [K-1:0] gs [STAGES+1];
  logic [K-1:0] ps [STAGES+1];
  logic [K-1:0] cy;   // carry into digit k

  assign b = ~neg;

  for (genvar k = 0; k < K; k++) begin : g_gp
    logic [2:0] ds;
    assign ds    = {1'b0, pos[2*k +: 2]} + {1'b0, b[2*k +: 2]};
    assign g0[k] = ds[2];
    assign p0[k] = (ds == 3'd3);
  end

  // Prefix network. The carry in (1) is folded into digit 0 as a generate.
  assign gs[0] = {g0[K-1:1], g0[0] | p0[0]};
  assign ps[0] = {p0[K-1:1], 1'b0};
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar k = 0; k < K; k++) begin : g_node
      if (k >= (1 << s)) begin : g_comb
        assign gs[s+1][k] = gs[s][k] | (ps[s][k] & gs[s][k - (1 << s)]);
        assign ps[s+1][k] = ps[s][k] & ps[s][k - (1 << s)];
      end else begin : g_pass
        assign gs[s+1][k] = gs[s][k];
        assign ps[s+1][k] = ps[s][k];
      end
    end
  end

  assign cy = {gs[STAGES][K-2:0], 1'b1};

  for (genvar k = 0; k < K; k++) begin : g_sum
    logic [1:0] sd;
    assign sd         = pos[2*k +: 2] + b[2*k +: 2] + {1'b0, cy[k]};
    assign p[2*k +: 2] = sd;
  end
endmodule
