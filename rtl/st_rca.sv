// st_rca: N-bit self-timed ripple-carry adder built from dual-rail domino
// full adders, with word-level completion detection.
//
// Each bit's carry out feeds the next bit's carry in, so the carry ripples
// from bit 0 to bit N-1. Because the carry is dual-rail, a bit whose operands
// are equal (both 0: kill, both 1: generate) resolves its carry without
// waiting for the carry in; only propagate bits (operands differ) wait for the
// ripple. The time to completion therefore depends on the data: it is set by
// the longest run of propagate bits actually present, not by the worst case.
//
// Completion: done is the AND of every bit's Done output (carry resolved) and
// of every sum pair being valid, so done rises only when the whole word is
// valid. idle is 1 when every rail of the result (sums, carry, bit Done
// signals) is back to 0 after precharge; a controller waits for it before
// starting the next evaluation. Combining the bit completion signals with an
// AND, and adding the sum rails to it, is this design's choice: the design
// describes the per-bit Done only.
//
// Interface: phi (0 precharge, 1 evaluate), a[N], b[N], cin (dual-rail) ->
// s[N], cout (dual-rail), done, idle. Combinational; no clock.
module st_rca
  import st_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic phi,
  input  dr_t  a   [N],
  input  dr_t  b   [N],
  input  dr_t  cin,
  output dr_t  s   [N],
  output dr_t  cout,
  output logic done,
  output logic idle
);

  dr_t  carry    [N+1];
  logic bit_done [N];

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    st_full_adder u_fa (
      .phi (phi),
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .s   (s[i]),
      .cout(carry[i+1]),
      .done(bit_done[i])
    );
  end

  assign cout = carry[N];

  always_comb begin
    done = 1'b1;
    idle = 1'b1;
    for (int i = 0; i < N; i++) begin
      done &= bit_done[i] & dr_valid(s[i]);
      idle &= ~bit_done[i] & dr_empty(s[i]) & dr_empty(carry[i+1]);
    end
  end
endmodule
