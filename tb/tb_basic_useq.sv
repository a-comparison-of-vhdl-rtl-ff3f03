// tb_basic_useq: runs the four-state example program (rep_ucode_pkg) on the
// basic sequencer and compares the outputs every clock with a reference
// model. The model has five states: A, B, C, D and the extra word W that
// takes D back to A (two clocks for D->A). Conditions are used unregistered
// and reset acts on the next edge. A second program checks the polarity bit:
// a branch taken when the condition is 0.
module tb_basic_useq;
  import useq_pkg::*;

  function automatic image_t pol_image();
    image_t m = '{default: '0};
    // 0: Y=01, branch to 0 while tms = 0 (polarity 1), continue when tms = 1
    m[0] = img_word_t'(0) | (img_word_t'(1) << 8) | (img_word_t'(1) << 11)
         | (img_word_t'(1) << 12);
    // 1: Y=10, unconditional branch back to 0
    m[1] = img_word_t'(0) | (img_word_t'(0) << 8) | (img_word_t'(1) << 11)
         | (img_word_t'(2) << 12);
    return m;
  endfunction
  localparam image_t PIMG = pol_image();

  logic clk = 0, nreset, tms;
  logic [1:0] y, py;
  logic [7:0] addr, paddr;
  int checks = 0, failures = 0, wraps = 0, pol_branches = 0;

  basic_useq #(.IMAGE(rep_ucode_pkg::IMAGE)) dut (
    .clk, .nreset, .cond_in({6'b0, tms}), .outputs(y), .addr);
  basic_useq #(.IMAGE(PIMG)) dut_pol (
    .clk, .nreset, .cond_in({6'b0, tms}), .outputs(py), .addr(paddr));

  always #5 clk = ~clk;

  // 0..3 = A..D, 4 = W
  int st, ps;
  always_ff @(posedge clk) begin
    if (!nreset) begin
      st <= 0; ps <= 0;
    end else begin
      case (st)
        3:       st <= tms ? 3 : 4;
        4:       begin st <= 0; wraps++; end
        default: st <= tms ? st : st + 1;
      endcase
      if (ps == 0) begin
        if (!tms) pol_branches++;
        ps <= tms ? 1 : 0;
      end else ps <= 0;
    end
  end

  initial begin
    nreset = 0; tms = 0;
    repeat (3) @(negedge clk);
    nreset = 1;
    for (int n = 0; n < 400; n++) begin
      tms = ($urandom % 3) == 0;
      @(negedge clk);
      checks += 2;
      if (y !== ((st == 4) ? 2'd3 : 2'(st))) begin
        failures++;
        $display("mismatch at %0d: y=%b state=%0d", n, y, st);
      end
      if (py !== ((ps == 0) ? 2'd1 : 2'd2)) begin
        failures++;
        $display("polarity program mismatch at %0d: y=%b", n, py);
      end
    end
    if (wraps == 0 || pol_branches == 0) failures++;
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
