// tb_tap_ctrl: runs the TAP controller on all four combinations of sequencer
// (scaled-down, full-scale) and memory (EAB-style ROM, LUT) with a random
// tms stream and compares the one-hot outputs every clock with tap_ref.
// Fails if any of the 16 TAP states was never visited, or if the full-scale
// program never took its counter (two-way) branch.
module tb_tap_ctrl;
  import useq_pkg::*;

  logic clk = 0, nreset, tms;
  logic [15:0] o_se, o_sl, o_fe, o_fl, e_s, e_f;
  logic [7:0]  a_se, a_sl, a_fe, a_fl;
  int st_s, st_f, vc_s, vc_f;
  int checks = 0, failures = 0;
  int visits [17];

  tap_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_EAB)) d_se (.clk, .nreset, .tms, .state_out(o_se), .addr(a_se));
  tap_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_LUT)) d_sl (.clk, .nreset, .tms, .state_out(o_sl), .addr(a_sl));
  tap_ctrl #(.ARCH(ARCH_FULL_SCALE),  .MEM(MEM_EAB)) d_fe (.clk, .nreset, .tms, .state_out(o_fe), .addr(a_fe));
  tap_ctrl #(.ARCH(ARCH_FULL_SCALE),  .MEM(MEM_LUT)) d_fl (.clk, .nreset, .tms, .state_out(o_fl), .addr(a_fl));

  tap_ref #(.FULL(1'b0)) r_s (.clk, .nreset, .tms, .exp_out(e_s), .state(st_s), .via_ctr(vc_s));
  tap_ref #(.FULL(1'b1)) r_f (.clk, .nreset, .tms, .exp_out(e_f), .state(st_f), .via_ctr(vc_f));

  always #5 clk = ~clk;

  initial begin
    foreach (visits[k]) visits[k] = 0;
    nreset = 0; tms = 1;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      nreset = (n % 1000) != 999;      // an occasional reset in mid-run
      tms = ($urandom % 100) < 40;
      @(negedge clk);
      if (n > 2 && (n % 1000) > 2) begin
        checks += 4;
        if (o_se !== e_s) begin failures++; $display("%0d SCDN/EAB %h exp %h", n, o_se, e_s); end
        if (o_sl !== e_s) begin failures++; $display("%0d SCDN/LUT %h exp %h", n, o_sl, e_s); end
        if (o_fe !== e_f) begin failures++; $display("%0d FLSC/EAB %h exp %h", n, o_fe, e_f); end
        if (o_fl !== e_f) begin failures++; $display("%0d FLSC/LUT %h exp %h", n, o_fl, e_f); end
        visits[st_s]++;
        visits[st_f]++;
      end
    end
    for (int k = 0; k < 17; k++) begin
      checks++;
      if (visits[k] == 0) begin failures++; $display("state %0d never visited", k); end
    end
    checks++;
    if (vc_f == 0) begin failures++; $display("counter branch never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
