// st_pkg: shared types for the self-timed dual-rail adder.
//
// Every data bit inside the self-timed adder travels on two wires, a true
// rail and a false rail (dual-rail code). During precharge both rails are 0
// ("empty"); during evaluation exactly one rail rises and then holds
// ("valid"); both rails high never occurs. The helper functions below encode,
// decode and classify such pairs. The adder word width used by the top is a
// parameter there; the four-bit default follows the four-bit ripple-carry
// adder drawn in the design's block diagram.
package st_pkg;

  // One dual-rail bit: t rises for a logic 1, f rises for a logic 0.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  // Encode a single-rail bit into a dual-rail pair, gated by an enable
  // (the enable low gives the empty code).
  function automatic dr_t dr_encode(input logic en, input logic v);
    dr_t r;
    r.t = en & v;
    r.f = en & ~v;
    return r;
  endfunction

  // A pair holds a value once either rail has risen.
  function automatic logic dr_valid(input dr_t d);
    return d.t | d.f;
  endfunction

  // A pair is empty (precharged) when neither rail is high.
  function automatic logic dr_empty(input dr_t d);
    return ~(d.t | d.f);
  endfunction

  // Both rails high is an illegal code word.
  function automatic logic dr_illegal(input dr_t d);
    return d.t & d.f;
  endfunction

  // ---------------------------------------------------------------------
  // Gate delays used by the simulation model of the domino gates.
  //
  // A domino gate's delay is tau * (g * h + p): tau is the delay unit of the
  // process (17.52 ps for the 0.18 um process the gates were characterised
  // in), g the gate's logical effort, h its electrical effort (fan-out) and p
  // its parasitic delay, both in units of tau. For the whole domino gate
  // (dynamic stage plus high-skew output inverter) the characterisation gives
  // g = 1.455118 and p = 4.254657 (AND, slower input), 4.712854 (OR) and
  // 1.665108 + 1.12045 + 2.127515 + 0.3075876 = 5.2207 (AND-OR, input c).
  // For the sum gate p is formed the same way from its embedded stage,
  // 1.665108 + 2.26256 + 0.833278 * 5/2 + 0.3075876 = 6.3185 (slowest input).
  // Taking h = 1 for every gate gives the values below, in picoseconds. The
  // input latch is given the AND gate's delay. Synthesis ignores all of them.
  // ---------------------------------------------------------------------
  localparam int unsigned D_AND_PS   = 100;  // 17.52 * (1.455118 + 4.254657)
  localparam int unsigned D_OR_PS    = 108;  // 17.52 * (1.455118 + 4.712854)
  localparam int unsigned D_AO21_PS  = 117;  // 17.52 * (1.455118 + 5.220661)
  localparam int unsigned D_SUM_PS   = 136;  // 17.52 * (1.455118 + 6.318451)
  localparam int unsigned D_LATCH_PS = 100;  // assumed equal to the AND gate

endpackage
