// tb_scaled_down_useq: runs the four-state example machine (outputs 00, 01,
// 10, 11; advance while tms = 0, stay while tms = 1) on the scaled-down
// sequencer at its default sizes, once with each memory style, and compares
// the outputs every clock with a reference model of the machine that
// includes the input register and the registered reset. Also checks that
// the sequencer sits in state A (address 0) while reset is applied and that
// it makes exactly one state transition per clock.
module tb_scaled_down_useq;
  import useq_pkg::*;

  // Word layout of this sequencer: [7:0] bus A, [15:8] bus B, [18:16]
  // select, [20:19] outputs. Select 0 is tms, select 7 the constant 0.
  function automatic img_word_t w(int y, int sel, int a, int b);
    return img_word_t'(a) | (img_word_t'(b) << 8) | (img_word_t'(sel) << 16)
         | (img_word_t'(y) << 19);
  endfunction

  function automatic image_t make_image();
    image_t m = '{default: '0};
    // Address 0 is an unconditional branch to A, as the reset word.
    m[0] = w(0, 7, 1, 1);
    m[1] = w(0, 0, 2, 1);    // A: tms 0 -> B, 1 -> A
    m[2] = w(1, 0, 3, 2);    // B
    m[3] = w(2, 0, 4, 3);    // C
    m[4] = w(3, 0, 1, 4);    // D: tms 0 -> A
    return m;
  endfunction
  localparam image_t IMG = make_image();

  logic clk = 0, nreset, tms;
  logic [6:0] cond;
  logic [1:0] y_eab, y_lut;
  logic [7:0] addr_eab, addr_lut;
  logic [20:0] uw_eab, uw_lut;
  int checks = 0, failures = 0, moves = 0, stays = 0;

  assign cond = {6'b0, tms};

  scaled_down_useq #(.MEM(MEM_EAB), .IMAGE(IMG)) dut_eab (
    .clk, .nreset, .cond_in(cond), .outputs(y_eab), .addr(addr_eab), .uword(uw_eab));
  scaled_down_useq #(.MEM(MEM_LUT), .IMAGE(IMG)) dut_lut (
    .clk, .nreset, .cond_in(cond), .outputs(y_lut), .addr(addr_lut), .uword(uw_lut));

  always #5 clk = ~clk;

  // Reference: -1 is the reset word, 0..3 are A..D.
  int st;
  logic nq, tq;
  always_ff @(posedge clk) begin
    nq <= nreset;
    tq <= tms;
    if (!nq)          st <= -1;
    else if (st < 0)  st <= 0;
    else if (!tq)     begin st <= (st + 1) % 4; moves++; end
    else              stays++;
  end

  function automatic logic [1:0] exp_y(int s);
    return (s < 0) ? 2'b00 : 2'(s);
  endfunction

  initial begin
    nreset = 0; tms = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (addr_eab !== 8'd0 || addr_lut !== 8'd0) begin
      failures++;
      $display("address not 0 during reset");
    end
    nreset = 1;
    for (int n = 0; n < 400; n++) begin
      tms = ($urandom % 3) == 0;
      @(negedge clk);
      checks += 2;
      if (y_eab !== exp_y(st)) begin
        failures++;
        $display("EAB mismatch at %0d: y=%b exp=%b", n, y_eab, exp_y(st));
      end
      if (y_lut !== exp_y(st)) begin
        failures++;
        $display("LUT mismatch at %0d: y=%b exp=%b", n, y_lut, exp_y(st));
      end
    end
    if (moves == 0 || stays == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
