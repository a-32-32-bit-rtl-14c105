// me_control: multiplication-control gates and the ME edge logic.
//
// The multiplication-enable input ME frames one multiplication: the array
// starts when ME rises and the product is latched into the P register when
// ME falls, so the ME pulse width is the time the array is given.
// ME is sampled into me_q at every rising clock edge. While me_q is low the
// control gates (AND gates between the Y register and the recoder) hold the
// recoder input at 0, so every partial product and the array output are 0.
// p_load is high in the cycle in which me_q is still high and ME is already
// low: at the end of that cycle the P register takes the product that the
// array computed during the pulse. An ME pulse of one clock cycle is enough.
// Timing: ME high in cycle t -> me_q high in t+1 -> ME low in t+1 gives
// p_load in t+1 and the product in the P register from t+2.
module me_control #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         me,
  input  logic [N-1:0] y_q,
  output logic [N-1:0] y_gated,
  output logic         me_q,
  output logic         p_load
);
  always_ff @(posedge clk) begin
    if (!rst_n) me_q <= 1'b0;
    else        me_q <= me;
  end

  assign y_gated = y_q & {N{me_q}};
  assign p_load  = me_q & ~me;
endmodule
