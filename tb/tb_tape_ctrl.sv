// tb_tape_ctrl: runs the tape cartridge controller on all four combinations
// of sequencer and memory style with random inputs and compares the thirteen
// outputs every clock with tape_ref. Fails if any of the 61 states was never
// visited (state A is only entered through reset, which the run applies
// again every 1500 clocks).
module tb_tape_ctrl;
  import useq_pkg::*;
  import tape_ucode_pkg::tape_in_t;

  logic clk = 0, nreset;
  tape_in_t tin;
  logic [12:0] o_se, o_sl, o_fe, o_fl, e;
  logic [7:0] a_se, a_sl, a_fe, a_fl;
  int st;
  int checks = 0, failures = 0;
  int visits [61];

  tape_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_EAB)) d_se (.clk, .nreset, .tin, .p(o_se), .addr(a_se));
  tape_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_LUT)) d_sl (.clk, .nreset, .tin, .p(o_sl), .addr(a_sl));
  tape_ctrl #(.ARCH(ARCH_FULL_SCALE),  .MEM(MEM_EAB)) d_fe (.clk, .nreset, .tin, .p(o_fe), .addr(a_fe));
  tape_ctrl #(.ARCH(ARCH_FULL_SCALE),  .MEM(MEM_LUT)) d_fl (.clk, .nreset, .tin, .p(o_fl), .addr(a_fl));

  tape_ref r (.clk, .nreset, .tin, .exp_p(e), .state(st));

  always #5 clk = ~clk;

  initial begin
    foreach (visits[k]) visits[k] = 0;
    nreset = 0; tin = '0;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      nreset = (n % 1500) != 1499;     // an occasional reset in mid-run
      tin = tape_in_t'($urandom);
      @(negedge clk);
      if (n > 2) begin
        checks += 4;
        if (o_se !== e) begin failures++; $display("%0d SCDN/EAB %h exp %h", n, o_se, e); end
        if (o_sl !== e) begin failures++; $display("%0d SCDN/LUT %h exp %h", n, o_sl, e); end
        if (o_fe !== e) begin failures++; $display("%0d FLSC/EAB %h exp %h", n, o_fe, e); end
        if (o_fl !== e) begin failures++; $display("%0d FLSC/LUT %h exp %h", n, o_fl, e); end
        visits[st]++;
      end
    end
    for (int k = 0; k < 61; k++) begin
      checks++;
      if (visits[k] == 0) begin failures++; $display("state %0d never visited", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
