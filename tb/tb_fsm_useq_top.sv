// tb_fsm_useq_top: end-to-end test of the whole design at its default sizes.
// Drives all seven sequencer instances of fsm_useq_top with random inputs and periodic
// resets and compares every output, every clock, with reference models
// (tap_ref, temp_ref, tape_ref and an inline model of the four-state example). It also
// counts how often each sequencing mechanism happened and fails if one never
// did: reset to address 0, continue to the next address, unconditional
// branch, conditional branch with the condition 0 and with it 1, the
// full-scale counter load and two-way branch through the counter, and the
// basic sequencer's unconditional branch via the polarity bit.
module tb_fsm_useq_top;
  import temp_ucode_pkg::temp_in_t;
  import temp_ucode_pkg::temp_out_t;
  import tape_ucode_pkg::tape_in_t;

  logic clk = 0, nreset, tms, rep_tms;
  temp_in_t temp_in;
  logic [15:0] tap_scdn_out, tap_flsc_out, e_ts, e_tf;
  temp_out_t temp_scdn_out, temp_flsc_out, e_t;
  tape_in_t tape_in;
  logic [12:0] tape_scdn_p, tape_flsc_p, e_p;
  logic [1:0] rep_y;
  logic [7:0] tap_scdn_addr, tap_flsc_addr, temp_scdn_addr, temp_flsc_addr, rep_addr;
  logic [7:0] tape_scdn_addr, tape_flsc_addr;
  int st_ts, st_tf, vc_s, vc_f, st_t, st_p;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_reset = 0, n_continue = 0, n_uncond = 0, n_cond0 = 0, n_cond1 = 0;
  int n_ctr_load = 0, n_polarity = 0;

  fsm_useq_top dut (.*);

  tap_ref #(.FULL(1'b0)) r_ts (.clk, .nreset, .tms, .exp_out(e_ts), .state(st_ts), .via_ctr(vc_s));
  tap_ref #(.FULL(1'b1)) r_tf (.clk, .nreset, .tms, .exp_out(e_tf), .state(st_tf), .via_ctr(vc_f));
  temp_ref r_t (.clk, .nreset, .cin(temp_in), .exp_out(e_t), .state(st_t));
  tape_ref r_p (.clk, .nreset, .tin(tape_in), .exp_p(e_p), .state(st_p));

  // Four-state example on the basic sequencer: 0..3 = A..D, 4 = the extra
  // word that returns D to A. Its condition input is not registered.
  int st_r;
  always_ff @(posedge clk) begin
    if (!nreset) st_r <= 0;
    else case (st_r)
      3:       st_r <= rep_tms ? 3 : 4;
      4:       st_r <= 0;
      default: st_r <= rep_tms ? st_r : st_r + 1;
    endcase
  end

  always #5 clk = ~clk;

  // Mechanism counting from the temperature unit's state (unconditional
  // words are A, C, F, H, L, P, S, V) and its inputs, the full-scale TAP's
  // addresses, and the example machine.
  logic [7:0] prev_fa;
  always @(negedge clk) begin
    if (nreset && dut.nreset) begin
      case (st_t)
        0, 2, 5, 7, 11, 15, 18, 21: n_uncond++;
        default: ;
      endcase
      if (tap_flsc_addr == prev_fa + 8'd1) n_continue++;
      if (st_tf == 16) n_ctr_load++;
      if (st_r == 4) n_polarity++;
    end
    prev_fa = tap_flsc_addr;
  end

  initial begin
    nreset = 0; tms = 1; rep_tms = 0; temp_in = '0; tape_in = '0;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      nreset = (n % 2500) != 2499;
      if (!nreset) n_reset++;
      tms = ($urandom % 100) < 40;
      rep_tms = ($urandom % 3) == 0;
      temp_in = temp_in_t'($urandom);
      temp_in.end_ = ($urandom % 4) == 0;
      tape_in = tape_in_t'($urandom);
      @(posedge clk);
      if (r_tf.nq) begin
        if (r_tf.tq) n_cond1++; else n_cond0++;
      end
      @(negedge clk);
      if (n > 2) begin
        checks += 8;
        if (tap_scdn_out !== e_ts) begin failures++; $display("%0d TAP scaled-down %h exp %h", n, tap_scdn_out, e_ts); end
        if (tap_flsc_out !== e_tf) begin failures++; $display("%0d TAP full-scale %h exp %h", n, tap_flsc_out, e_tf); end
        if (temp_scdn_out !== e_t) begin failures++; $display("%0d temp scaled-down %h exp %h", n, temp_scdn_out, e_t); end
        if (temp_flsc_out !== e_t) begin failures++; $display("%0d temp full-scale %h exp %h", n, temp_flsc_out, e_t); end
        if (tape_scdn_p !== e_p) begin failures++; $display("%0d tape scaled-down %h exp %h", n, tape_scdn_p, e_p); end
        if (tape_flsc_p !== e_p) begin failures++; $display("%0d tape full-scale %h exp %h", n, tape_flsc_p, e_p); end
        if (rep_y !== ((st_r == 4) ? 2'd3 : 2'(st_r))) begin failures++; $display("%0d example y=%b state %0d", n, rep_y, st_r); end
        if (!r_tf.nq && (tap_scdn_addr !== 8'd0 || tap_flsc_addr !== 8'd0 ||
                         temp_scdn_addr !== 8'd0 || temp_flsc_addr !== 8'd0 ||
                         tape_scdn_addr !== 8'd0 || tape_flsc_addr !== 8'd0)) begin
          failures++; $display("%0d address not 0 in reset", n);
        end
      end
    end
    $display("mechanisms: reset=%0d continue=%0d uncond_branch=%0d cond_0=%0d cond_1=%0d ctr_load=%0d two_way_via_ctr=%0d polarity_branch=%0d",
             n_reset, n_continue, n_uncond, n_cond0, n_cond1, n_ctr_load, vc_f, n_polarity);
    checks += 8;
    if (n_reset == 0)    begin failures++; $display("reset never happened"); end
    if (n_continue == 0) begin failures++; $display("continue never happened"); end
    if (n_uncond == 0)   begin failures++; $display("unconditional branch never happened"); end
    if (n_cond0 == 0)    begin failures++; $display("condition 0 never tested"); end
    if (n_cond1 == 0)    begin failures++; $display("condition 1 never tested"); end
    if (n_ctr_load == 0) begin failures++; $display("counter load never happened"); end
    if (vc_f == 0)       begin failures++; $display("two-way branch never happened"); end
    if (n_polarity == 0) begin failures++; $display("polarity branch never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
