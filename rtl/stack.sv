// stack: last-in first-out store of return addresses for the full-scale
// sequencer's subroutine calls. With enable = 1, pushpop = 1 pushes d and
// pushpop = 0 pops; the top entry is always visible on o, so a return reads
// o and pops in the same cycle. The depth is this design's choice (the
// document gives none); pushing onto a full stack drops the oldest entry and
// popping an empty one keeps it empty with o = 0. clr empties it
// synchronously (tied to the sequencer's reset).
module stack #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] d,
  input  logic         enable,
  input  logic         pushpop,
  output logic [W-1:0] o
);
  logic [W-1:0] mem [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] count;

  always_ff @(posedge clk) begin
    if (clr) begin
      count <= '0;
      for (int k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else if (enable && pushpop) begin
      // Entry 0 is the top; shifting keeps the logic a plain register file.
      mem[0] <= d;
      for (int k = 1; k < DEPTH; k++) mem[k] <= mem[k-1];
      if (count != DEPTH[$bits(count)-1:0]) count <= count + 1'b1;
    end else if (enable && !pushpop) begin
      for (int k = 0; k < DEPTH-1; k++) mem[k] <= mem[k+1];
      mem[DEPTH-1] <= '0;
      if (count != '0) count <= count - 1'b1;
    end
  end

  assign o = mem[0];
endmodule
