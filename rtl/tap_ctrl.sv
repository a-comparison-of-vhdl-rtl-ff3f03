// tap_ctrl: IEEE 1149.1 TAP controller state machine implemented as a
// microprogram. ARCH picks the scaled-down or the full-scale sequencer and
// MEM the memory style (embedded-array ROM or lookup tables); the matching
// image comes from tap_ucode_pkg. state_out has one bit per TAP state
// (bit 0 Test-Logic-Reset ... bit 15 Update-IR, see tap_ucode_pkg).
//
// Timing: tms is registered inside the sequencer, so the state entered at a
// rising edge depends on tms as sampled one edge earlier. After reset the
// machine is in Test-Logic-Reset. The full-scale program has one extra
// state (no output bit set) between Test-Logic-Reset and Run-Test/Idle.
module tap_ctrl
  import useq_pkg::*;
#(
  parameter arch_e ARCH = ARCH_SCALED_DOWN,
  parameter mem_e  MEM  = MEM_LUT
) (
  input  logic        clk,
  input  logic        nreset,
  input  logic        tms,
  output logic [15:0] state_out,
  output logic [7:0]  addr
);
  localparam int SEL_W = tap_ucode_pkg::SEL_W;
  logic [(1<<SEL_W)-2:0] cond;
  assign cond = {{((1<<SEL_W)-2){1'b0}}, tms};

  if (ARCH == ARCH_SCALED_DOWN) begin : g_scdn
    scaled_down_useq #(.SEL_W(SEL_W), .N_OUT(tap_ucode_pkg::N_OUT), .MEM(MEM),
                       .IMAGE(tap_ucode_pkg::SCDN_IMAGE)) u_seq (
      .clk, .nreset, .cond_in(cond), .outputs(state_out), .addr, .uword());
  end else begin : g_flsc
    full_scale_useq #(.SEL_W(SEL_W), .N_OUT(tap_ucode_pkg::N_OUT), .MEM(MEM),
                      .IMAGE(tap_ucode_pkg::FLSC_IMAGE)) u_seq (
      .clk, .nreset, .cond_in(cond), .outputs(state_out), .addr, .uword());
  end
endmodule
