// st_input_latch: input latch with enable for the self-timed adder.
//
// It captures single-rail operand bits when load is 1 and drives them into
// the domino adder as dual-rail pairs gated by start: while start is 0 every
// pair is empty (both rails 0), which is the state the domino gates need
// during precharge; when start rises, exactly one rail of each pair rises.
// Gating the rails with start makes start the local clock of the adder,
// and the latched operands stay stable for the whole evaluation.
//
// The design names this latch (the enabled latch at the head of every
// active path) but does not draw it; holding the operands in flip-flops
// written on a clock edge is this design's choice.
//
// Interface: clk, rst_n (active-low asynchronous reset clears the stored
// bits), load (capture d on the next rising clk edge), d[W] single-rail,
// start -> q[W] dual-rail. q follows start after DLY_PS picoseconds (a
// simulation delay, ignored by synthesis).
module st_input_latch
  import st_pkg::*;
#(
  parameter int unsigned W      = 9,
  parameter int unsigned DLY_PS = D_LATCH_PS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         start,
  output dr_t          q [W]
);

  logic [W-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r <= '0;
    else if (load) r <= d;
  end

  for (genvar i = 0; i < W; i++) begin : g_rail
    assign #(DLY_PS * 1ps) q[i] = dr_encode(start, r[i]);
  end
endmodule
