// basic_useq: the basic microsequencer the other two are derived from.
//
// MUX1 chooses constant 0 (select 0) or one of seven condition inputs
// (select k reads cond_in[k-1]); the result XORed with the polarity bit drives MUX2, which
// takes the microprogram counter register (0) or the branch address (1).
// The incrementer adds one to MUX2's output and the counter register stores
// it, so the counter always holds the address after the one being fetched.
// The microprogram memory is read combinationally and its word is held in
// the pipeline register.
//   continue               select 0, polarity 0
//   unconditional branch   select 0, polarity 1
//   branch if condition 1  select k, polarity 0 (polarity 1: branch if 0)
//
// Microinstruction (N_OUT+12 bits): [7:0] branch address, [10:8] select,
// [11] polarity, outputs from bit 12. The document gives the field widths;
// their order is this design's choice. Conditions are used as they arrive
// (no input register), as in the document's diagram.
//
// Timing: one microinstruction per clock. Reset: active-low nreset forces
// MUX2 to address 0 while it is low (it is not registered here).
module basic_useq
  import useq_pkg::*;
#(
  parameter int     ADDR_W = 8,
  parameter int     N_OUT  = 2,
  parameter image_t IMAGE  = '{default: '0},
  localparam int    UW     = ADDR_W + 4 + N_OUT
) (
  input  logic              clk,
  input  logic              nreset,
  input  logic [6:0]        cond_in,
  output logic [N_OUT-1:0]  outputs,
  output logic [ADDR_W-1:0] addr
);
  logic [UW-1:0]     pipe;
  logic [ADDR_W-1:0] upc;
  logic              cond, polarity;
  logic [2:0]        csel;

  assign csel     = pipe[ADDR_W +: 3];
  assign polarity = pipe[ADDR_W+3];
  assign outputs  = pipe[ADDR_W+4 +: N_OUT];

  muxstatth #(.SEL_W(3)) u_mux1 (.i({cond_in, 1'b0}), .s(csel), .y(cond));

  mux2 #(.W(ADDR_W)) u_mux2 (
    .sel(cond ^ polarity), .nreset, .a(upc), .b(pipe[ADDR_W-1:0]), .y(addr));

  always_ff @(posedge clk) begin
    upc  <= addr + ADDR_W'(1);
    pipe <= IMAGE[addr][UW-1:0];
  end
endmodule
