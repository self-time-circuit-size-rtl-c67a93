// dyn_sum: domino sum gate, y = (a + b + c)*d + a*b*c (dynamic stage followed
// by a high-skew inverter).
//
// Operation: phi = 0 precharges (y = 0). With phi = 1 the node discharges
// when at least one of a, b, c is 1 and d is 1, or when all three of a, b, c
// are 1. In the full adder a, b, c are one rail of the two operands and the
// carry in, and d is the opposite rail of the carry out. On the true rail this
// gives sum = 1 when exactly one input is 1 (carry out is 0) or when all three
// are 1: the odd-parity function A xor B xor Cin, built only from
// non-inverting (monotonic) terms as domino logic requires. The complementary
// rail uses the false rails of the inputs and the true rail of carry out.
//
// Timing: y follows its inputs after DLY_PS picoseconds, in both the
// evaluate and the precharge direction (a simulation delay only).
//
// Interface: phi, a, b, c, d -> y. Combinational; no clock.
module dyn_sum #(
  parameter int unsigned DLY_PS = st_pkg::D_SUM_PS  // evaluate/precharge delay, ps
) (
  input  logic phi,
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y
);

  logic node;

  assign node = ~(phi & (((a | b | c) & d) | (a & b & c)));
  assign #(DLY_PS * 1ps) y = ~node;
endmodule
