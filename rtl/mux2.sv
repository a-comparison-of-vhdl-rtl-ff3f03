// mux2: next-address selector of the microsequencers, eight 2-input
// multiplexers. sel = 0 passes bus A, sel = 1 passes bus B. An active-low
// nreset forces the output to address 0 whatever the other inputs are, which
// is how every sequencer here is reset. Combinational.
module mux2 #(
  parameter int W = 8
) (
  input  logic         sel,
  input  logic         nreset,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb begin
    if (!nreset)  y = '0;
    else if (sel) y = b;
    else          y = a;
  end
endmodule
