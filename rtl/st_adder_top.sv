// st_adder_top: self-timed N-bit adder stage, with the single-precision
// floating-point adder alongside.
//
// Self-timed adder stage. Operands arrive on a four-phase bundled channel
// (add_in_req / add_in_ack with add_a, add_b, add_cin). The handshake
// controller loads them into the input latch and raises start, the local
// clock of the stage. The latch presents the operands to the dual-rail domino
// ripple-carry adder as dual-rail pairs; the adder evaluates, and its
// completion detector raises done once every carry and sum bit is valid. The
// controller then offers the result on the output channel (add_out_req /
// add_out_ack with add_sum, add_cout). After the acknowledge it drops start,
// the domino gates precharge, and once the adder reports idle the next
// operands are accepted. add_sum and add_cout hold the result while
// add_out_req is high and are 0 during precharge.
//
// Floating-point adder. fpa_x + fpa_y -> fpa_z with fpa_flags, combinational,
// independent of the adder stage; it is the arithmetic unit the ripple-carry
// adder is meant to serve.
//
// Parameter N (adder width, default 4 as in the design's four-bit
// ripple-carry adder). Clock clk samples the handshake; rst_n is an active-low
// asynchronous reset. Assertions check the dual-rail code: no rail pair is
// ever 11, and while start is high no rail that has risen falls again
// (domino outputs are monotonic during evaluation).
module st_adder_top
  import st_pkg::*;
  import fpa_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // self-timed adder: input channel
  input  logic         add_in_req,
  output logic         add_in_ack,
  input  logic [N-1:0] add_a,
  input  logic [N-1:0] add_b,
  input  logic         add_cin,
  // self-timed adder: output channel
  output logic         add_out_req,
  input  logic         add_out_ack,
  output logic [N-1:0] add_sum,
  output logic         add_cout,
  // floating-point adder
  input  logic [31:0]  fpa_x,
  input  logic [31:0]  fpa_y,
  output logic [31:0]  fpa_z,
  output fpa_flags_t   fpa_flags
);

  logic load, start, done, idle;
  dr_t  lat_q [2*N+1];
  dr_t  op_a  [N];
  dr_t  op_b  [N];
  dr_t  sum   [N];
  dr_t  cout;

  hs_ctrl u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_req (add_in_req),
    .in_ack (add_in_ack),
    .out_req(add_out_req),
    .out_ack(add_out_ack),
    .load   (load),
    .start  (start),
    .done   (done),
    .idle   (idle)
  );

  // latch word layout: [N-1:0] = a, [2N-1:N] = b, [2N] = carry in
  st_input_latch #(.W(2*N+1)) u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .d    ({add_cin, add_b, add_a}),
    .start(start),
    .q    (lat_q)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      op_a[i] = lat_q[i];
      op_b[i] = lat_q[N+i];
    end
  end

  st_rca #(.N(N)) u_rca (
    .phi (start),
    .a   (op_a),
    .b   (op_b),
    .cin (lat_q[2*N]),
    .s   (sum),
    .cout(cout),
    .done(done),
    .idle(idle)
  );

  always_comb begin
    for (int i = 0; i < N; i++) add_sum[i] = sum[i].t;
    add_cout = cout.t;
  end

  fp_adder u_fpa (
    .x    (fpa_x),
    .y    (fpa_y),
    .z    (fpa_z),
    .flags(fpa_flags)
  );

  // dual-rail code checks
  logic [2*N:0] rails_t, rails_f, rails_t_q, rails_f_q;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      rails_t[i] = sum[i].t;
      rails_f[i] = sum[i].f;
      rails_t[N+i] = op_a[i].t;
      rails_f[N+i] = op_a[i].f;
    end
    rails_t[2*N] = cout.t;
    rails_f[2*N] = cout.f;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rails_t_q <= '0;
      rails_f_q <= '0;
    end else begin
      rails_t_q <= rails_t;
      rails_f_q <= rails_f;
    end
  end
  a_no_illegal_code: assert property (@(posedge clk) disable iff (!rst_n)
    (rails_t & rails_f) == '0);
  a_monotonic_eval: assert property (@(posedge clk) disable iff (!rst_n)
    start && $past(start) |-> ((rails_t_q & ~rails_t) | (rails_f_q & ~rails_f)) == '0);
endmodule
