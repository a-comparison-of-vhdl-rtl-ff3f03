// muxstatth: condition multiplexer of the microsequencers. It passes the one
// synchronised input chosen by the microinstruction's select field; its output
// steers MUX2. Purely combinational. The document uses eight inputs (3-bit
// select); a machine with more conditions uses a wider select.
module muxstatth #(
  parameter int SEL_W = 3
) (
  input  logic [(1<<SEL_W)-1:0] i,
  input  logic [SEL_W-1:0]      s,
  output logic                  y
);
  always_comb y = i[s];
endmodule
