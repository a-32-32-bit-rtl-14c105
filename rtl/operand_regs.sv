// operand_regs: the X (multiplicand) and Y (multiplier) input registers.
//
// Both registers load x_in / y_in at a rising clock edge while ld is high and
// hold otherwise. Synchronous, active-low reset clears them. The load enable
// and the reset are this design's choice.
module operand_regs #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [N-1:0] x_in,
  input  logic [N-1:0] y_in,
  output logic [N-1:0] x_q,
  output logic [N-1:0] y_q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else if (ld) begin
      x_q <= x_in;
      y_q <= y_in;
    end
  end
endmodule
