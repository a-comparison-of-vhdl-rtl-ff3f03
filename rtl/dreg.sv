// dreg: bank of clocked D registers that synchronise the condition inputs of
// a microsequencer to the rising clock edge (DREG in the scaled-down and
// full-scale sequencers). Each output is its input delayed by one clock, so a
// microinstruction tests the input value sampled at the edge that loaded it.
// No reset, as the document describes plain clocked D registers.
module dreg #(
  parameter int WIDTH = 7
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) q <= d;
endmodule
