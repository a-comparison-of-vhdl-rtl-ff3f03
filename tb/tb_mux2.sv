// tb_mux2: checks bus selection and that nreset = 0 forces address 0.
module tb_mux2;
  logic sel, nreset;
  logic [7:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  mux2 #(.W(8)) dut (.sel, .nreset, .a, .b, .y);

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = 8'($urandom); b = 8'($urandom);
      sel = 1'($urandom); nreset = (n % 4) != 0;
      #1;
      exp_y = !nreset ? 8'h00 : (sel ? b : a);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("mismatch sel=%b nreset=%b y=%h exp=%h", sel, nreset, y, exp_y);
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
