// tb_temp_ctrl: runs the temperature control unit on all four combinations
// of sequencer and memory style with random inputs and compares the twelve
// outputs every clock with temp_ref. Fails if any of the 22 states was never
// visited (state A is only entered through reset, which the run applies
// again every 1500 clocks).
module tb_temp_ctrl;
  import useq_pkg::*;
  import temp_ucode_pkg::temp_in_t;
  import temp_ucode_pkg::temp_out_t;

  logic clk = 0, nreset;
  temp_in_t cin;
  temp_out_t o_se, o_sl, o_fe, o_fl, e;
  logic [7:0] a_se, a_sl, a_fe, a_fl;
  int st;
  int checks = 0, failures = 0;
  int visits [22];

  temp_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_EAB)) d_se (.clk, .nreset, .cin, .cout(o_se), .addr(a_se));
  temp_ctrl #(.ARCH(ARCH_SCALED_DOWN), .MEM(MEM_LUT)) d_sl (.clk, .nreset, .cin, .cout(o_sl), .addr(a_sl));
  temp_ctrl #(.ARCH(ARCH_FULL_SCALE),  .MEM(MEM_EAB)) d_fe (.clk, .nreset, .cin, .cout(o_fe), .addr(a_fe));
  temp_ctrl #(.ARCH(ARCH_FULL_SCALE),  .MEM(MEM_LUT)) d_fl (.clk, .nreset, .cin, .cout(o_fl), .addr(a_fl));

  temp_ref r (.clk, .nreset, .cin, .exp_out(e), .state(st));

  always #5 clk = ~clk;

  initial begin
    foreach (visits[k]) visits[k] = 0;
    nreset = 0; cin = '0;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      nreset = (n % 1500) != 1499;     // an occasional reset in mid-run
      cin = temp_in_t'($urandom);
      cin.end_ = ($urandom % 4) == 0;
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
    for (int k = 0; k < 22; k++) begin
      checks++;
      if (visits[k] == 0) begin failures++; $display("state %0d never visited", k); end
    end
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
