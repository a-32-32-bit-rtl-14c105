// product_reg: the P (product) output register.
//
// Loads d at a rising clock edge while load is high (the ME falling-edge
// strobe from me_control) and holds otherwise. Synchronous, active-low reset
// to 0 (the reset is this design's choice).
module product_reg #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
