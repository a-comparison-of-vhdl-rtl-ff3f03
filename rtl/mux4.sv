// mux4: eight 4-input multiplexers of the full-scale microsequencer. The
// inputs are the branch-address field (A), the STACKCTR counter (B), the top
// of the return stack (C) and the incrementer (D); select codes 00..11 pick
// A..D in that order (see useq_pkg::na_sel_e). Combinational.
module mux4 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [1:0]   s,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (s)
      2'b00: y = a;
      2'b01: y = b;
      2'b10: y = c;
      default: y = d;
    endcase
  end
endmodule
