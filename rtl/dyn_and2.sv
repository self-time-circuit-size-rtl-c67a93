// dyn_and2: domino 2-input AND gate (dynamic NAND stage followed by a
// high-skew inverter).
//
// Operation: while phi is 0 the dynamic node is precharged high and the
// output y is 0. While phi is 1 the n-type pull-down network (a and b in
// series) discharges the node when both inputs are 1, and the output inverter
// drives y to 1. Because every input comes from another domino gate, inputs
// only rise during evaluation, so y makes at most one 0->1 transition per
// evaluation and holds it (the keeper of the transistor circuit retains the
// node value; in logic this is simply the AND of phi and the inputs).
//
// Timing: y follows its inputs after DLY_PS picoseconds, in both the
// evaluate and the precharge direction (a simulation delay only).
//
// Timing: y follows its inputs after DLY_PS picoseconds, in both the
// evaluate and the precharge direction (a simulation delay only).
//
// Interface: phi (precharge 0 / evaluate 1), a, b -> y. Combinational, no
// clock.
module dyn_and2 #(
  parameter int unsigned DLY_PS = st_pkg::D_AND_PS  // evaluate/precharge delay, ps
) (
  input  logic phi,
  input  logic a,
  input  logic b,
  output logic y
);

  logic node;  // dynamic node: 1 = precharged, 0 = discharged

  assign node = ~(phi & a & b);            // clocked pull-down, foot on phi
  assign #(DLY_PS * 1ps) y = ~node;        // high-skew output inverter
endmodule
