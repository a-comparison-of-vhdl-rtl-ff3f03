// lut_rom: microprogram memory built from logic-cell lookup tables. Each bank
// is WIDTH 4-input LUTs, i.e. a 16-word array addressed by addr[3:0]; a
// multiplexer driven by the upper address bits picks one bank, and the
// output registers (the flip-flops of the cells that form the multiplexer)
// hold the result. Two banks and a 2-input mux make 32 words; this module
// generalises that to 2**(ADDR_W-4) banks. Timing equals eab_rom: the
// registered q holds the word addressed before the last rising edge.
module lut_rom
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
  localparam int NBANK = 1 << (ADDR_W - 4);

  logic [WIDTH-1:0] bank_out [NBANK];

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    // One 16 x WIDTH lookup-table array.
    logic [WIDTH-1:0] lut [16];
    for (genvar e = 0; e < 16; e++) begin : g_entry
      assign lut[e] = IMAGE[b*16 + e][WIDTH-1:0];
    end
    assign bank_out[b] = lut[addr[3:0]];
  end

  always_ff @(posedge clk) q <= bank_out[addr[ADDR_W-1:4]];
endmodule
