// full_scale_useq: the full-scale microsequencer. It adds to the scaled-down
// sequencer a registered incrementer (INCREM), a return-address stack
// (STACK), a loop counter with its own stack (STACKCTR) and two MUX4
// next-address multiplexers, so that one branch field can serve continue,
// branch, two-way branch, subroutine call/return and counted (nested) loops.
//
// Next address: MUXSTATTH picks the tested condition; MUX2 takes the output
// of the first MUX4 when it is 0 and of the second MUX4 when it is 1. Each
// MUX4 chooses among the branch field (00), the counter (01), the stack top
// (10) and INCREM (11, the current address + 1).
//   continue            sel0 = sel1 = INC
//   branch              sel0 = sel1 = BRANCH
//   conditional branch  sel0 = INC, sel1 = BRANCH (or the reverse)
//   two-way branch      counter loaded earlier with one target, branch field
//                       holds the other: sel0 = CTR, sel1 = BRANCH
//   call                sel = BRANCH, stack push (pushes INCREM, the return
//                       address)
//   return              sel = STACK, stack pop
//   loop                cntnload = 0 loads the count; the last word of the
//                       body tests UNDERFLOW, branches back while it is 0 and
//                       counts down (cnten)
// UNDERFLOW is wired to the highest MUXSTATTH input, which the scaled-down
// sequencer ties to 0; that wiring is this design's choice.
//
// Microinstruction (ADDR_W+9+SEL_W+N_OUT bits): [7:0] branch field, [9:8]
// sel0, [11:10] sel1, 12 counter-stack enable, 13 cntnload (active low), 14
// cnten, 15 pushpop (1 = push), 16 stack enable, [17+SEL_W-1:17] condition
// select, outputs above; positions as in the document's schematic.
//
// Timing and reset as scaled_down_useq; the registered nreset also clears
// both stacks and the counter.
module full_scale_useq
  import useq_pkg::*;
#(
  parameter int     ADDR_W      = 8,
  parameter int     SEL_W       = 3,
  parameter int     N_OUT       = 2,
  parameter int     STACK_DEPTH = 4,
  parameter mem_e   MEM         = MEM_EAB,
  parameter image_t IMAGE       = '{default: '0},
  localparam int    NCOND       = (1 << SEL_W) - 1,
  localparam int    UW          = ADDR_W + 9 + SEL_W + N_OUT
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
  logic [ADDR_W-1:0] branch, inc_y, stack_o, ctr_q, na0, na1;
  logic              underflow;
  fs_ctl_t           ctl;
  logic [SEL_W-1:0]  csel;

  assign branch  = uword[ADDR_W-1:0];
  assign ctl     = uword[ADDR_W +: 9];
  assign csel    = uword[ADDR_W+9 +: SEL_W];
  assign outputs = uword[ADDR_W+9+SEL_W +: N_OUT];

  dreg #(.WIDTH(NCOND)) u_dreg (.clk, .d(cond_in), .q(cond_q));

  always_ff @(posedge clk) nreset_q <= nreset;

  muxstatth #(.SEL_W(SEL_W)) u_muxstat (
    .i({underflow, cond_q}), .s(csel), .y(sel));

  mux4 #(.W(ADDR_W)) u_mux4_0 (
    .a(branch), .b(ctr_q), .c(stack_o), .d(inc_y), .s(ctl.sel0), .y(na0));
  mux4 #(.W(ADDR_W)) u_mux4_1 (
    .a(branch), .b(ctr_q), .c(stack_o), .d(inc_y), .s(ctl.sel1), .y(na1));

  mux2 #(.W(ADDR_W)) u_mux2 (
    .sel, .nreset(nreset_q), .a(na0), .b(na1), .y(addr));

  increm #(.W(ADDR_W)) u_increm (.clk, .a(addr), .y(inc_y));

  stack #(.W(ADDR_W), .DEPTH(STACK_DEPTH)) u_stack (
    .clk, .clr(!nreset_q), .d(inc_y), .enable(ctl.stack_en),
    .pushpop(ctl.pushpop), .o(stack_o));

  stackctr #(.W(ADDR_W), .DEPTH(STACK_DEPTH)) u_stackctr (
    .clk, .clr(!nreset_q), .cntnload(ctl.cntnload), .cnten(ctl.cnten),
    .a(branch), .pushpop(ctl.pushpop), .stacken(ctl.stacken),
    .q(ctr_q), .underflow);

  if (MEM == MEM_EAB) begin : g_eab
    eab_rom #(.ADDR_W(ADDR_W), .WIDTH(UW), .IMAGE(IMAGE)) u_mem (
      .clk, .addr, .q(uword));
  end else begin : g_lut
    lut_rom #(.ADDR_W(ADDR_W), .WIDTH(UW), .IMAGE(IMAGE)) u_mem (
      .clk, .addr, .q(uword));
  end
endmodule
