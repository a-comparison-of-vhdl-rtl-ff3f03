// fsm_useq_top: microprogrammed state machines side by side.
//   u_tap_scdn   TAP controller on the scaled-down sequencer, LUT memory
//   u_tap_flsc   TAP controller on the full-scale sequencer, EAB-style ROM
//   u_temp_scdn  temperature control unit, scaled-down, EAB-style ROM
//   u_temp_flsc  temperature control unit, full-scale, LUT memory
//   u_tape_scdn  tape cartridge controller, scaled-down, LUT memory
//   u_tape_flsc  tape cartridge controller, full-scale, EAB-style ROM
//   u_rep        four-state example machine on the basic sequencer
// The instances share clk and nreset (active low) and nothing else; each has
// its own inputs and outputs. The *_addr outputs show the microprogram
// address each sequencer fetches next. Which memory style goes with which
// instance is arbitrary: both are functionally identical.
module fsm_useq_top
  import useq_pkg::*;
  import temp_ucode_pkg::temp_in_t;
  import temp_ucode_pkg::temp_out_t;
  import tape_ucode_pkg::tape_in_t;
(
  input  logic        clk,
  input  logic        nreset,
  input  logic        tms,
  input  temp_in_t    temp_in,
  input  tape_in_t    tape_in,
  input  logic        rep_tms,
  output logic [15:0] tap_scdn_out,
  output logic [15:0] tap_flsc_out,
  output temp_out_t   temp_scdn_out,
  output temp_out_t   temp_flsc_out,
  output logic [12:0] tape_scdn_p,
  output logic [12:0] tape_flsc_p,
  output logic [1:0]  rep_y,
  output logic [7:0]  tap_scdn_addr,
  output logic [7:0]  tap_flsc_addr,
  output logic [7:0]  temp_scdn_addr,
  output logic [7:0]  temp_flsc_addr,
  output logic [7:0]  tape_scdn_addr,
  output logic [7:0]  tape_flsc_addr,
  output logic [7:0]  rep_addr
);
  tap_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_LUT)) u_tap_scdn (
    .clk, .nreset, .tms, .state_out(tap_scdn_out), .addr(tap_scdn_addr));

  tap_ctrl #(.ARCH(ARCH_FULL_SCALE), .MEM(MEM_EAB)) u_tap_flsc (
    .clk, .nreset, .tms, .state_out(tap_flsc_out), .addr(tap_flsc_addr));

  temp_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_EAB)) u_temp_scdn (
    .clk, .nreset, .cin(temp_in), .cout(temp_scdn_out), .addr(temp_scdn_addr));

  temp_ctrl #(.ARCH(ARCH_FULL_SCALE), .MEM(MEM_LUT)) u_temp_flsc (
    .clk, .nreset, .cin(temp_in), .cout(temp_flsc_out), .addr(temp_flsc_addr));

  tape_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_LUT)) u_tape_scdn (
    .clk, .nreset, .tin(tape_in), .p(tape_scdn_p), .addr(tape_scdn_addr));

  tape_ctrl #(.ARCH(ARCH_FULL_SCALE), .MEM(MEM_EAB)) u_tape_flsc (
    .clk, .nreset, .tin(tape_in), .p(tape_flsc_p), .addr(tape_flsc_addr));

  basic_useq #(.N_OUT(rep_ucode_pkg::N_OUT), .IMAGE(rep_ucode_pkg::IMAGE)) u_rep (
    .clk, .nreset, .cond_in({6'b0, rep_tms}), .outputs(rep_y),
    .addr(rep_addr));
endmodule
