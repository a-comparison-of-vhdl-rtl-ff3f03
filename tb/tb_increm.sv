// tb_increm: checks that the output is the input of the previous edge plus
// one, including the wrap from 255 to 0.
module tb_increm;
  logic clk = 0;
  logic [7:0] a, y, prev;
  int checks = 0, failures = 0;

  increm #(.W(8)) dut (.clk, .a, .y);

  always #5 clk = ~clk;

  initial begin
    a = '0;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      prev = (n == 0) ? 8'hff : 8'($urandom);
      a = prev;
      @(negedge clk);
      checks++;
      if (y !== 8'(prev + 8'd1)) begin
        failures++;
        $display("mismatch a=%h y=%h", prev, y);
      end
    end
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
