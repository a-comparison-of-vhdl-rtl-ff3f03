// tb_stack: random push / pop / idle traffic compared with a queue model that
// keeps at most DEPTH entries (oldest dropped) and shows 0 when empty.
module tb_stack;
  localparam int DEPTH = 4;
  logic clk = 0, clr, enable, pushpop;
  logic [7:0] d, o, exp_o;
  logic [7:0] model [$];
  int checks = 0, failures = 0, pushes = 0, pops = 0;

  stack #(.W(8), .DEPTH(DEPTH)) dut (.clk, .clr, .d, .enable, .pushpop, .o);

  always #5 clk = ~clk;

  initial begin
    clr = 1; enable = 0; pushpop = 0; d = '0;
    @(negedge clk); @(negedge clk);
    clr = 0;
    for (int n = 0; n < 2000; n++) begin
      enable = ($urandom % 4) != 0;
      pushpop = 1'($urandom);
      d = 8'($urandom);
      @(posedge clk);
      if (enable && pushpop) begin
        model.push_front(d);
        if (model.size() > DEPTH) void'(model.pop_back());
        pushes++;
      end else if (enable && model.size() > 0) begin
        void'(model.pop_front());
        pops++;
      end
      @(negedge clk);
      exp_o = (model.size() > 0) ? model[0] : 8'h00;
      checks++;
      if (o !== exp_o) begin
        failures++;
        $display("mismatch o=%h exp=%h", o, exp_o);
      end
    end
    if (pushes == 0 || pops == 0) failures++;
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
