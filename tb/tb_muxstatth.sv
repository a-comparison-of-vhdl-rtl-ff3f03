// tb_muxstatth: exhaustive check of the condition multiplexer over every
// select code with random input patterns.
module tb_muxstatth;
  localparam int SW = 3;
  logic [(1<<SW)-1:0] i;
  logic [SW-1:0] s;
  logic y;
  int checks = 0, failures = 0;

  muxstatth #(.SEL_W(SW)) dut (.i, .s, .y);

  initial begin
    for (int n = 0; n < 64; n++) begin
      i = 8'($urandom);
      for (int k = 0; k < (1<<SW); k++) begin
        s = SW'(k);
        #1;
        checks++;
        if (y !== ((i >> k) & 1'b1)) begin
          failures++;
          $display("mismatch i=%b s=%0d y=%b", i, k, y);
        end
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
