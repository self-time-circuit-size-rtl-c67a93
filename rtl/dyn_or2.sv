// dyn_or2: domino 2-input OR gate (dynamic NOR stage followed by a high-skew
// inverter).
//
// Operation: phi = 0 precharges the dynamic node high, so y = 0. With phi = 1
// the two parallel pull-down transistors discharge the node when either input
// is 1 and y rises. Inputs are monotonic (0->1 only) during evaluation, so y
// rises at most once and holds. This gate forms the propagate term of the
// adder and, on the two carry rails, the Done (completion) signal.
//
// Timing: y follows its inputs after DLY_PS picoseconds, in both the
// evaluate and the precharge direction (a simulation delay only).
//
// Interface: phi, a, b -> y. Combinational; no clock.
module dyn_or2 #(
  parameter int unsigned DLY_PS = st_pkg::D_OR_PS  // evaluate/precharge delay, ps
) (
  input  logic phi,
  input  logic a,
  input  logic b,
  output logic y
);

  logic node;

  assign node = ~(phi & (a | b));
  assign #(DLY_PS * 1ps) y = ~node;
endmodule
