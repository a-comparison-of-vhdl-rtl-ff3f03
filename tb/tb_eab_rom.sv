// tb_eab_rom: fills the image with a formula, reads every address and checks
// that the registered output shows the addressed word one edge later and not
// before it.
module tb_eab_rom;
  import useq_pkg::*;

  function automatic image_t make_image();
    image_t m;
    for (int k = 0; k < 256; k++)
      m[k] = {32'(k * 32'h9e37_79b9), 32'(k ^ (k << 9) ^ 32'h5a5a_0000)};
    return m;
  endfunction
  localparam image_t IMG = make_image();

  logic clk = 0;
  logic [7:0] addr, prev;
  logic [31:0] q, held;
  int checks = 0, failures = 0;

  eab_rom #(.ADDR_W(8), .WIDTH(32), .IMAGE(IMG)) dut (.clk, .addr, .q);

  always #5 clk = ~clk;

  initial begin
    addr = '0;
    @(negedge clk);
    for (int n = 0; n < 512; n++) begin
      prev = (n < 256) ? 8'(n) : 8'($urandom);
      held = q;
      addr = prev;
      #1;
      // The output is registered: a new address shows only after an edge.
      checks++;
      if (q !== held) begin
        failures++;
        $display("output changed without a clock edge");
      end
      @(negedge clk);
      checks++;
      if (q !== IMG[prev][31:0]) begin
        failures++;
        $display("mismatch addr=%0d q=%h exp=%h", prev, q, IMG[prev][31:0]);
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
