// temp_ctrl: temperature control unit state machine implemented as a
// microprogram (see temp_ucode_pkg for the states). ARCH picks the
// scaled-down or full-scale sequencer, MEM the memory style. Nine condition
// inputs need a 16-input condition multiplexer (4-bit select); the unused
// inputs are tied to 0.
//
// Timing: inputs are registered inside the sequencer; each state lasts one
// clock; the outputs are those of the current state. Reset enters state A.
module temp_ctrl
  import useq_pkg::*;
  import temp_ucode_pkg::*;
#(
  parameter arch_e ARCH = ARCH_SCALED_DOWN,
  parameter mem_e  MEM  = MEM_LUT
) (
  input  logic      clk,
  input  logic      nreset,
  input  temp_in_t  cin,
  output temp_out_t cout,
  output logic [7:0] addr
);
  logic [14:0] cond;
  logic [11:0] outs;

  assign cond = {6'b0, cond_vector(cin)};
  assign cout = temp_out_t'(outs);

  if (ARCH == ARCH_SCALED_DOWN) begin : g_scdn
    scaled_down_useq #(.SEL_W(temp_ucode_pkg::SEL_W), .N_OUT(temp_ucode_pkg::N_OUT), .MEM(MEM),
                       .IMAGE(temp_ucode_pkg::SCDN_IMAGE)) u_seq (
      .clk, .nreset, .cond_in(cond), .outputs(outs), .addr, .uword());
  end else begin : g_flsc
    full_scale_useq #(.SEL_W(temp_ucode_pkg::SEL_W), .N_OUT(temp_ucode_pkg::N_OUT), .MEM(MEM),
                      .IMAGE(temp_ucode_pkg::FLSC_IMAGE)) u_seq (
      .clk, .nreset, .cond_in(cond), .outputs(outs), .addr, .uword());
  end
endmodule
