// tape_ctrl: quarter-inch tape cartridge controller state machine (61
// states) implemented as a microprogram (see tape_ucode_pkg for the states).
// ARCH picks the scaled-down or full-scale sequencer, MEM the memory style.
// Five condition inputs (cc, t0..t3) fit the 8-input condition multiplexer
// (3-bit select); inputs 5 and 6 are tied to 0.
//
// Timing: inputs are registered inside the sequencer; each state lasts one
// clock; p holds the outputs P0..P12 of the current state. Reset enters
// state A.
module tape_ctrl
  import useq_pkg::*;
  import tape_ucode_pkg::tape_in_t;
#(
  parameter arch_e ARCH = ARCH_SCALED_DOWN,
  parameter mem_e  MEM  = MEM_LUT
) (
  input  logic        clk,
  input  logic        nreset,
  input  tape_in_t    tin,
  output logic [12:0] p,
  output logic [7:0]  addr
);
  logic [6:0] cond;

  assign cond = {2'b0, tin.t, tin.cc};

  if (ARCH == ARCH_SCALED_DOWN) begin : g_scdn
    scaled_down_useq #(.SEL_W(tape_ucode_pkg::SEL_W), .N_OUT(tape_ucode_pkg::N_OUT), .MEM(MEM),
                       .IMAGE(tape_ucode_pkg::SCDN_IMAGE)) u_seq (
      .clk, .nreset, .cond_in(cond), .outputs(p), .addr, .uword());
  end else begin : g_flsc
    full_scale_useq #(.SEL_W(tape_ucode_pkg::SEL_W), .N_OUT(tape_ucode_pkg::N_OUT), .MEM(MEM),
                      .IMAGE(tape_ucode_pkg::FLSC_IMAGE)) u_seq (
      .clk, .nreset, .cond_in(cond), .outputs(p), .addr, .uword());
  end
endmodule
