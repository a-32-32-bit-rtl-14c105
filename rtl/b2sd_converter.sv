// b2sd_converter: binary-to-SD converter of one partial-product generator.
//
// It takes the bits of the two multiples A_j = U_j*X (bits a_0..a_N) and
// B_j = V_j*X (bits b_0..b_(N+2)) as delivered by the data selectors, each as
// a magnitude bit whose sign is fixed by position and group parity:
//   even group: a_i, b_i count +1 ; the top bits a_N, b_(N+2) count -1
//   odd group : a_i, b_i count -1 ; the top bits a_N, b_(N+2) count +1
// and forms radix-4 SD digits (Eq. 21-24 of the published design):
//   z_i = 2 b_(2i+1) + b_2i + 2 a_(2i+1) + a_2i      i = 0 .. N/2-1
//   4 c_i + w_i = z_i   (even: c = 1 if z >= 3 ; odd: c = -1 if z <= -3)
//   p_i = w_i + c_(i-1)
// giving digits in {-1..3} (even) or {-3..1} (odd). The most significant
// digit is z = 4 b_(N+2) + 2 b_(N+1) + b_N + a_N (signed values), plus c_(N/2-1).
// That digit can reach +-4; this design splits it once more with the SDFA
// rule into a digit in {-2..2} and an extra top digit in {-1,0,1}, so that
// the first adder level never sees a linear sum outside -6..6. The output
// therefore has N/2+2 digits, one more than the N/2+1 of the published design.
// Combinational.
module b2sd_converter
  import sd_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter bit          ODD = 1'b0
) (
  input  logic [N:0]   a_bits,
  input  logic [N+2:0] b_bits,
  output sd_digit_t    pp [N/2+2]
);
  localparam int unsigned D = N / 2;

  sd_digit_t c [D];
  sd_digit_t w [D];

  for (genvar i = 0; i < D; i++) begin : g_dig
    sd_digit_t zmag, z;
    assign zmag = sd_digit_t'({b_bits[2*i+1], 1'b0}) + sd_digit_t'(b_bits[2*i])
                + sd_digit_t'({a_bits[2*i+1], 1'b0}) + sd_digit_t'(a_bits[2*i]);
    assign z    = ODD ? -zmag : zmag;
    if (ODD) begin : g_odd
      assign c[i] = (z <= -4'sd3) ? -4'sd1 : 4'sd0;
    end else begin : g_even
      assign c[i] = (z >= 4'sd3) ? 4'sd1 : 4'sd0;
    end
    assign w[i] = z - (c[i] <<< 2);
    if (i == 0) begin : g_lsd
      assign pp[i] = w[i];
    end else begin : g_mid
      assign pp[i] = w[i] + c[i-1];
    end
  end

  // Most significant digit (Eq. 24 with signed bit values), then split by
  // an SDFA into a digit in -2..2 and a top digit in -1..1.
  sd_digit_t zt_mag, zt, pt, ct, wt_inv;
  always_comb begin
    zt_mag = sd_digit_t'({b_bits[N+1], 1'b0}) + sd_digit_t'(b_bits[N])
           - sd_digit_t'({b_bits[N+2], 2'b00}) - sd_digit_t'(a_bits[N]);
    zt     = ODD ? -zt_mag : zt_mag;
    pt     = zt + c[D-1];
  end

  sdfa u_msd_split (.z(pt), .c(ct), .w_inv(wt_inv));

  assign pp[D]   = -wt_inv;
  assign pp[D+1] = ct;
endmodule
