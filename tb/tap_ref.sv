// tap_ref: reference model of the IEEE 1149.1 TAP controller as the
// microprogrammed versions run it: tms and reset are registered first, one
// state per clock, one-hot outputs (bit 0 Test-Logic-Reset, then Run-Test/
// Idle, Select-DR, Capture-DR, Shift-DR, Exit1-DR, Pause-DR, Exit2-DR,
// Update-DR, Select-IR, Capture-IR, Shift-IR, Exit1-IR, Pause-IR, Exit2-IR,
// Update-IR). With FULL = 1 the extra counter-loading state sits between
// Test-Logic-Reset and Run-Test/Idle and drives no output. via_ctr counts
// the transitions the full-scale program takes through its counter.
module tap_ref #(
  parameter bit FULL = 1'b0
) (
  input  logic        clk,
  input  logic        nreset,
  input  logic        tms,
  output logic [15:0] exp_out,
  output int          state,
  output int          via_ctr
);
  typedef enum int {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR, XB
  } tap_e;

  tap_e st, nx;
  logic nq, tq;

  always_comb begin
    case (st)
      TLR:    nx = tq ? TLR    : (FULL ? XB : RTI);
      XB:     nx = RTI;
      RTI:    nx = tq ? SEL_DR : RTI;
      SEL_DR: nx = tq ? SEL_IR : CAP_DR;
      CAP_DR: nx = tq ? EX1_DR : SH_DR;
      SH_DR:  nx = tq ? EX1_DR : SH_DR;
      EX1_DR: nx = tq ? UPD_DR : PAU_DR;
      PAU_DR: nx = tq ? EX2_DR : PAU_DR;
      EX2_DR: nx = tq ? UPD_DR : SH_DR;
      UPD_DR: nx = tq ? SEL_DR : RTI;
      SEL_IR: nx = tq ? TLR    : CAP_IR;
      CAP_IR: nx = tq ? EX1_IR : SH_IR;
      SH_IR:  nx = tq ? EX1_IR : SH_IR;
      EX1_IR: nx = tq ? UPD_IR : PAU_IR;
      PAU_IR: nx = tq ? EX2_IR : PAU_IR;
      EX2_IR: nx = tq ? UPD_IR : SH_IR;
      default: nx = tq ? SEL_DR : RTI;   // UPD_IR
    endcase
  end

  int vc = 0;

  always_ff @(posedge clk) begin
    nq <= nreset;
    tq <= tms;
    if (!nq) st <= TLR;
    else     st <= nx;
  end

  always @(posedge clk)
    if (nq && FULL && !tq && (st == RTI || st == UPD_DR || st == UPD_IR))
      vc <= vc + 1;

  assign via_ctr = vc;

  assign exp_out = (st == XB) ? 16'h0 : (16'h1 << int'(st));
  assign state   = int'(st);
endmodule
