// st_full_adder: one-bit self-timed full adder in dual-rail domino logic,
// with a completion (Done) output.
//
// Structure (one gate per line, each a domino gate clocked by phi):
//   gen_t  = AND(a.t, b.t)         gen_f  = AND(a.f, b.f)
//   prop_t = OR (a.t, b.t)         prop_f = OR (a.f, b.f)
//   cout.t = AO21(cin.t, prop_t, gen_t)   (Cout = A*B + Cin*(A+B))
//   cout.f = AO21(cin.f, prop_f, gen_f)   (mirror image on the false rails)
//   s.t    = SUM(a.t, b.t, cin.t, cout.f)
//   s.f    = SUM(a.f, b.f, cin.f, cout.t)
//   done   = OR (cout.t, cout.f)
// The data path is built twice, once for each rail, so every output is a
// dual-rail pair that stays empty (both rails 0) during precharge and takes
// exactly one valid code during evaluation. Done rises when the carry out of
// the bit has resolved on either rail; because the sum gates wait on the
// carry rails, the sum follows the carry by one gate.
//
// The gate list, the use of a high-skew inverter after every dynamic stage,
// and Done built from the two carry rails follow the design's one-bit adder
// schematic. Using A+B rather than A xor B as the carry propagate term is the
// schematic's choice as well (both give the same carry).
//
// Interface: phi (precharge 0 / evaluate 1), a, b, cin (dual-rail) ->
// s, cout (dual-rail), done. Combinational; no clock.
module st_full_adder
  import st_pkg::*;
(
  input  logic phi,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  cin,
  output dr_t  s,
  output dr_t  cout,
  output logic done
);

  logic gen_t, gen_f, prop_t, prop_f;

  dyn_and2 u_gen_t  (.phi(phi), .a(a.t), .b(b.t), .y(gen_t));
  dyn_or2  u_prop_t (.phi(phi), .a(a.t), .b(b.t), .y(prop_t));
  dyn_and2 u_gen_f  (.phi(phi), .a(a.f), .b(b.f), .y(gen_f));
  dyn_or2  u_prop_f (.phi(phi), .a(a.f), .b(b.f), .y(prop_f));

  dyn_ao21 u_cout_t (.phi(phi), .a(cin.t), .b(prop_t), .c(gen_t), .y(cout.t));
  dyn_ao21 u_cout_f (.phi(phi), .a(cin.f), .b(prop_f), .c(gen_f), .y(cout.f));

  dyn_sum  u_sum_t  (.phi(phi), .a(a.t), .b(b.t), .c(cin.t), .d(cout.f), .y(s.t));
  dyn_sum  u_sum_f  (.phi(phi), .a(a.f), .b(b.f), .c(cin.f), .d(cout.t), .y(s.f));

  dyn_or2  u_done   (.phi(phi), .a(cout.t), .b(cout.f), .y(done));
endmodule
