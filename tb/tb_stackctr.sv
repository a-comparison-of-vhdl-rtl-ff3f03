// tb_stackctr: random load / count / push / pop traffic compared with a
// behavioural model of the counter and its save stack, plus the underflow
// flag (count = 0).
module tb_stackctr;
  localparam int DEPTH = 4;
  logic clk = 0, clr, cntnload, cnten, pushpop, stacken, underflow;
  logic [7:0] a, q, m_q;
  logic [7:0] m_stack [$];
  int checks = 0, failures = 0;
  int loads = 0, counts = 0, pushes = 0, pops = 0, unders = 0;

  stackctr #(.W(8), .DEPTH(DEPTH)) dut (
    .clk, .clr, .cntnload, .cnten, .a, .pushpop, .stacken, .q, .underflow);

  always #5 clk = ~clk;

  initial begin
    clr = 1; cntnload = 1; cnten = 0; pushpop = 0; stacken = 0; a = '0;
    m_q = '0;
    @(negedge clk); @(negedge clk);
    clr = 0;
    for (int n = 0; n < 3000; n++) begin
      cntnload = ($urandom % 5) != 0;
      cnten    = 1'($urandom);
      stacken  = ($urandom % 4) == 0;
      pushpop  = 1'($urandom);
      a        = 8'($urandom % 6);
      @(posedge clk);
      if (stacken && pushpop) begin
        m_stack.push_front(m_q);
        if (m_stack.size() > DEPTH) void'(m_stack.pop_back());
        pushes++;
      end
      if (stacken && !pushpop) begin
        m_q = (m_stack.size() > 0) ? m_stack.pop_front() : 8'h00;
        pops++;
      end else if (!cntnload) begin
        m_q = a; loads++;
      end else if (cnten) begin
        m_q = m_q - 8'd1; counts++;
      end
      @(negedge clk);
      checks += 2;
      if (q !== m_q) begin
        failures++;
        $display("mismatch q=%h exp=%h", q, m_q);
      end
      if (underflow !== (m_q == 8'h00)) begin
        failures++;
        $display("underflow mismatch q=%h uf=%b", q, underflow);
      end
      if (underflow) unders++;
    end
    if (loads == 0 || counts == 0 || pushes == 0 || pops == 0 || unders == 0)
      failures++;
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
