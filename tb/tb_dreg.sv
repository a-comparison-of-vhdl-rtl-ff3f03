// tb_dreg: checks that each output equals its input one rising edge later,
// over random input vectors, and that it does not change between edges.
module tb_dreg;
  localparam int W = 7;
  logic clk = 0;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  dreg #(.WIDTH(W)) dut (.clk, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] held;
      held = q;
      prev = W'($urandom);
      d = prev;
      #1;
      // A register must not pass a new input before the clock edge.
      checks++;
      if (q !== held) begin
        failures++;
        $display("output changed without a clock edge");
      end
      @(negedge clk);
      checks++;
      if (q !== prev) begin
        failures++;
        $display("mismatch: q=%h expected %h", q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
