// scaled_down_useq: the scaled-down microsequencer. One microinstruction
// implements one state of a synchronous state machine.
//
// Datapath: the condition inputs are registered in DREG; MUXSTATTH picks the
// one named by the select field; MUX2 uses it to choose bus A (condition 0)
// or bus B (condition 1) of the current microinstruction as the next address;
// the microprogram memory registers the word at that address into the
// pipeline register (uword) at the rising edge. A continue or unconditional
// branch puts the same address on both buses; a conditional branch puts the
// two successors on A and B. The highest MUXSTATTH input is tied to 0.
//
// Microinstruction (16+SEL_W+N_OUT bits): [7:0] bus A, [15:8] bus B,
// [16+SEL_W-1:16] condition select, outputs above. The field positions and the
// registered NRESET follow the document's schematic (for SEL_W = 3, N_OUT = 2).
//
// Timing: one state per clock. Outputs change at the edge that enters a state
// and stay for the whole state. A condition is tested one clock after it is
// sampled. Reset: nreset is registered; while the registered value is 0, MUX2
// forces address 0, so the pipeline register loads word 0 (the initial state)
// and the machine leaves it on the first edge after the release is registered.
module scaled_down_useq
  import useq_pkg::*;
#(
  parameter int     ADDR_W = 8,
  parameter int     SEL_W  = 3,
  parameter int     N_OUT  = 2,
  parameter mem_e   MEM    = MEM_EAB,
  parameter image_t IMAGE  = '{default: '0},
  localparam int    NCOND  = (1 << SEL_W) - 1,
  localparam int    UW     = 2*ADDR_W + SEL_W + N_OUT
) (
  input  logic              clk,
  input  logic              nreset,
  input  logic [NCOND-1:0]  cond_in,
  output logic [N_OUT-1:0]  outputs,
  output logic [ADDR_W-1:0] addr,
  output logic [UW-1:0]     uword
);
  logic [NCOND-1:0]  cond_q;
  logic              nreset_q;
  logic              sel;
  logic [ADDR_W-1:0] bus_a, bus_b;
  logic [SEL_W-1:0]  csel;

  assign bus_a   = uword[ADDR_W-1:0];
  assign bus_b   = uword[2*ADDR_W-1:ADDR_W];
  assign csel    = uword[2*ADDR_W +: SEL_W];
  assign outputs = uword[2*ADDR_W+SEL_W +: N_OUT];

  dreg #(.WIDTH(NCOND)) u_dreg (.clk, .d(cond_in), .q(cond_q));

  always_ff @(posedge clk) nreset_q <= nreset;

  muxstatth #(.SEL_W(SEL_W)) u_muxstatth (
    .i({1'b0, cond_q}), .s(csel), .y(sel));

  mux2 #(.W(ADDR_W)) u_mux2 (
    .sel, .nreset(nreset_q), .a(bus_a), .b(bus_b), .y(addr));

  if (MEM == MEM_EAB) begin : g_eab
    eab_rom #(.ADDR_W(ADDR_W), .WIDTH(UW), .IMAGE(IMAGE)) u_mem (
      .clk, .addr, .q(uword));
  end else begin : g_lut
    lut_rom #(.ADDR_W(ADDR_W), .WIDTH(UW), .IMAGE(IMAGE)) u_mem (
      .clk, .addr, .q(uword));
  end
endmodule
