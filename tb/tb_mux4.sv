// tb_mux4: checks that select codes 00, 01, 10, 11 pass inputs a, b, c, d.
module tb_mux4;
  logic [7:0] a, b, c, d, y, exp_y;
  logic [1:0] s;
  int checks = 0, failures = 0;

  mux4 #(.W(8)) dut (.a, .b, .c, .d, .s, .y);

  initial begin
    for (int n = 0; n < 400; n++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      s = 2'(n);
      #1;
      case (s)
        2'd0: exp_y = a;
        2'd1: exp_y = b;
        2'd2: exp_y = c;
        default: exp_y = d;
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("mismatch s=%0d y=%h exp=%h", s, y, exp_y);
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
