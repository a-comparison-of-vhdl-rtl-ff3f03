// eab_rom: microprogram memory in the style of an FPGA embedded array block
// used as a ROM: the address is not registered, the data output is. The
// output register is the sequencer's pipeline register, so q holds the word
// whose address was applied before the last rising edge. Contents come from
// the IMAGE parameter (the low WIDTH bits of each 64-bit entry); the
// document loads them from a memory initialisation file instead.
module eab_rom
  import useq_pkg::*;
#(
  parameter int     ADDR_W = 8,
  parameter int     WIDTH  = 32,
  parameter image_t IMAGE  = '{default: '0}
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  q
);
  always_ff @(posedge clk) q <= IMAGE[addr][WIDTH-1:0];
endmodule
