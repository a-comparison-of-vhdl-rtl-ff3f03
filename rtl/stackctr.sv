// stackctr: counter plus stack of the full-scale sequencer. The counter holds
// either a loop count or a second branch address for two-way branches.
//   cntnload = 0          load the counter from a (the branch field)
//   cnten = 1             count down by one
//   stacken=1, pushpop=1  push the current count (it may load in the same
//                         cycle, which starts an inner loop)
//   stacken=1, pushpop=0  pop: the saved count returns to the counter
// Priority: pop, then load, then count. underflow is 1 while the count is 0,
// the condition a loop's last microinstruction tests. Active-high synchronous
// clr empties the stack and clears the count. Load polarity follows the
// document; count direction, priority and depth are this design's choice.
module stackctr #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         cntnload,
  input  logic         cnten,
  input  logic [W-1:0] a,
  input  logic         pushpop,
  input  logic         stacken,
  output logic [W-1:0] q,
  output logic         underflow
);
  logic [W-1:0] saved [DEPTH];

  always_ff @(posedge clk) begin
    if (clr) begin
      q <= '0;
      for (int k = 0; k < DEPTH; k++) saved[k] <= '0;
    end else begin
      if (stacken && pushpop) begin
        saved[0] <= q;
        for (int k = 1; k < DEPTH; k++) saved[k] <= saved[k-1];
      end else if (stacken && !pushpop) begin
        for (int k = 0; k < DEPTH-1; k++) saved[k] <= saved[k+1];
        saved[DEPTH-1] <= '0;
      end

      if (stacken && !pushpop) q <= saved[0];
      else if (!cntnload)      q <= a;
      else if (cnten)          q <= q - W'(1);
    end
  end

  assign underflow = (q == '0);
endmodule
