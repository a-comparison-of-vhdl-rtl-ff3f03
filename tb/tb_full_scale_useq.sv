// tb_full_scale_useq: runs a test microprogram that uses every next-address
// source of the full-scale sequencer and compares the sequence of executed
// addresses, clock by clock, with a hand-worked trace. Each word outputs its
// own address (N_OUT = 8). The program covers continue, unconditional
// branch, conditional branch both ways, loading the counter with an address
// and a two-way branch through it, a nested subroutine call and return
// (stack depth 2), and a loop of 3 passes containing an inner loop of 2
// passes, with the outer count saved on the counter stack. The run is made
// once with the condition input x = 0 and once with x = 1, each from reset,
// with both memory styles.
//
// A second pair of instances runs the four-state example machine
// (rep_ucode_pkg::FLSC_IMAGE, outputs 00..11, stay while tms = 1, advance
// while tms = 0, D's exit a two-way branch through the counter) with random
// tms, compared every clock with a direct model that registers tms and
// reset as the sequencer does.
module tb_full_scale_useq;
  import useq_pkg::*;

  localparam int SW = 3;
  localparam int C_X = 0, C_UF = 7;

  function automatic fs_ctl_t ctl(na_sel_e s0, na_sel_e s1, logic stack_en,
                                  logic pushpop, logic cnten, logic cntnload,
                                  logic stacken);
    fs_ctl_t c;
    c.sel0 = s0; c.sel1 = s1; c.stack_en = stack_en; c.pushpop = pushpop;
    c.cnten = cnten; c.cntnload = cntnload; c.stacken = stacken;
    return c;
  endfunction

  function automatic img_word_t wd(int a, int cond, fs_ctl_t c, int br);
    return fs_word(SW, 32'(a), cond, c, br);
  endfunction

  function automatic image_t make_image();
    image_t m = '{default: '0};
    m[0]  = wd(0,  C_X,  ctl(NA_INC,    NA_INC,    0, 0, 0, 1, 0), 0);
    m[1]  = wd(1,  C_X,  ctl(NA_BRANCH, NA_BRANCH, 0, 0, 0, 1, 0), 10);
    m[10] = wd(10, C_X,  ctl(NA_INC,    NA_BRANCH, 0, 0, 0, 1, 0), 20);
    m[11] = wd(11, C_X,  ctl(NA_INC,    NA_INC,    0, 0, 0, 0, 0), 30); // ctr <= 30
    m[12] = wd(12, C_X,  ctl(NA_CTR,    NA_BRANCH, 0, 0, 0, 1, 0), 40); // two-way
    m[20] = wd(20, C_X,  ctl(NA_INC,    NA_INC,    0, 0, 0, 1, 0), 0);
    m[21] = wd(21, C_X,  ctl(NA_BRANCH, NA_BRANCH, 0, 0, 0, 1, 0), 11);
    m[30] = wd(30, C_X,  ctl(NA_BRANCH, NA_BRANCH, 1, 1, 0, 1, 0), 50); // call 50
    m[50] = wd(50, C_X,  ctl(NA_BRANCH, NA_BRANCH, 1, 1, 0, 1, 0), 60); // call 60
    m[60] = wd(60, C_X,  ctl(NA_STACK,  NA_STACK,  1, 0, 0, 1, 0), 0);  // return
    m[51] = wd(51, C_X,  ctl(NA_STACK,  NA_STACK,  1, 0, 0, 1, 0), 0);  // return
    m[31] = wd(31, C_X,  ctl(NA_INC,    NA_INC,    0, 0, 0, 0, 0), 2);  // ctr <= 2
    m[32] = wd(32, C_X,  ctl(NA_INC,    NA_INC,    0, 1, 0, 0, 1), 1);  // push, ctr <= 1
    m[33] = wd(33, C_UF, ctl(NA_BRANCH, NA_INC,    0, 0, 1, 1, 0), 33); // inner end
    m[34] = wd(34, C_X,  ctl(NA_INC,    NA_INC,    0, 0, 0, 1, 1), 0);  // pop count
    m[35] = wd(35, C_UF, ctl(NA_BRANCH, NA_INC,    0, 0, 1, 1, 0), 32); // outer end
    m[36] = wd(36, C_X,  ctl(NA_BRANCH, NA_BRANCH, 0, 0, 0, 1, 0), 36); // halt
    m[40] = wd(40, C_X,  ctl(NA_BRANCH, NA_BRANCH, 0, 0, 0, 1, 0), 36);
    return m;
  endfunction
  localparam image_t IMG = make_image();

  localparam int L0 = 28, L1 = 10;
  localparam int TRACE0 [L0] = '{0, 1, 10, 11, 12, 30, 50, 60, 51, 31,
                                  32, 33, 33, 34, 35, 32, 33, 33, 34, 35,
                                  32, 33, 33, 34, 35, 36, 36, 36};
  localparam int TRACE1 [L1] = '{0, 1, 10, 20, 21, 11, 12, 40, 36, 36};

  logic clk = 0, nreset, x;
  logic [6:0] cond;
  logic [7:0] tag_e, tag_l, addr_e, addr_l;
  logic [27:0] uw_e, uw_l;
  int checks = 0, failures = 0;

  assign cond = {6'b0, x};

  full_scale_useq #(.N_OUT(8), .MEM(MEM_EAB), .IMAGE(IMG)) dut_e (
    .clk, .nreset, .cond_in(cond), .outputs(tag_e), .addr(addr_e), .uword(uw_e));
  full_scale_useq #(.N_OUT(8), .MEM(MEM_LUT), .IMAGE(IMG)) dut_l (
    .clk, .nreset, .cond_in(cond), .outputs(tag_l), .addr(addr_l), .uword(uw_l));

  // Four-state example machine
  logic tms, rn;
  logic [1:0] y_e, y_l;
  logic [7:0] ra_e, ra_l;
  logic [21:0] ru_e, ru_l;
  logic nq, tq;
  logic [1:0] st;

  full_scale_useq #(.N_OUT(2), .MEM(MEM_EAB), .IMAGE(rep_ucode_pkg::FLSC_IMAGE)) rep_e (
    .clk, .nreset(rn), .cond_in({6'b0, tms}), .outputs(y_e), .addr(ra_e), .uword(ru_e));
  full_scale_useq #(.N_OUT(2), .MEM(MEM_LUT), .IMAGE(rep_ucode_pkg::FLSC_IMAGE)) rep_l (
    .clk, .nreset(rn), .cond_in({6'b0, tms}), .outputs(y_l), .addr(ra_l), .uword(ru_l));

  always_ff @(posedge clk) begin
    nq <= rn;
    tq <= tms;
    st <= !nq ? 2'd0 : (tq ? st : st + 2'd1);
  end

  always #5 clk = ~clk;

  task automatic run(input logic xv, input int len, input int trace []);
    nreset = 0; x = xv;
    repeat (4) @(negedge clk);
    nreset = 1;
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      checks += 2;
      if (tag_e !== 8'(trace[n]) || tag_l !== 8'(trace[n])) begin
        failures++;
        $display("x=%b step %0d: executed %0d/%0d, expected %0d",
                 xv, n, tag_e, tag_l, trace[n]);
      end
    end
  endtask

  initial begin
    int t0 [], t1 [];
    int n_dexit;
    rn = 0; tms = 0;
    t0 = new[L0]; t1 = new[L1];
    foreach (t0[k]) t0[k] = TRACE0[k];
    foreach (t1[k]) t1[k] = TRACE1[k];
    run(1'b0, L0, t0);
    run(1'b1, L1, t1);
    run(1'b0, L0, t0);
    n_dexit = 0;
    for (int n = 0; n < 600; n++) begin
      rn = (n % 200) >= 3;
      tms = ($urandom % 3) == 0;
      @(negedge clk);
      if (n > 2) begin
        checks += 2;
        if (y_e !== st || y_l !== st) begin
          failures++;
          $display("example step %0d: y %0d/%0d, expected %0d", n, y_e, y_l, st);
        end
        if (nq && !tq && st == 2'd3) n_dexit++;   // D -> A through the counter
      end
    end
    checks++;
    if (n_dexit == 0) begin failures++; $display("example machine never left D"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
