// dyn_ao21: domino AND-OR gate, y = a*b + c (dynamic AOI21 stage followed by
// a high-skew inverter).
//
// Operation: phi = 0 precharges (y = 0). With phi = 1 the pull-down network,
// a and b in series in parallel with c, discharges the node when a*b + c is
// true, and y rises and holds. In the full adder it is the carry gate:
// a = carry in, b = propagate (a OR b of the operands), c = generate
// (a AND b of the operands), on each of the two rails.
//
// Timing: y follows its inputs after DLY_PS picoseconds, in both the
// evaluate and the precharge direction (a simulation delay only).
//
// Interface: phi, a, b, c -> y. Combinational; no clock.
module dyn_ao21 #(
  parameter int unsigned DLY_PS = st_pkg::D_AO21_PS  // evaluate/precharge delay, ps
) (
  input  logic phi,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  logic node;

  assign node = ~(phi & ((a & b) | c));
  assign #(DLY_PS * 1ps) y = ~node;
endmodule
