// increm: incrementer with an output register, the microprogram counter of
// the full-scale sequencer. It registers (a + 1) at every rising edge, where a
// is the address being fetched, so while the pipeline register holds the
// word at address n the output is n + 1: the next sequential address and the
// return address a subroutine call pushes. The sum wraps from 255 to 0.
module increm #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  always_ff @(posedge clk) y <= a + W'(1);
endmodule
