// product_selector: drives the N-bit product output from the 2N-bit P
// register, sel = 0 selecting the low half and sel = 1 the high half.
// The half-word selection is this design's reading of the product selector;
// it lets a 32-bit output bus deliver the 64-bit product. Combinational.
module product_selector #(
  parameter int unsigned N = 32
) (
  input  logic           sel,
  input  logic [2*N-1:0] p,
  output logic [N-1:0]   p_out
);
  assign p_out = sel ? p[2*N-1:N] : p[N-1:0];
endmodule
