// hs_ctrl: four-phase (return-to-zero) handshake controller of one
// self-timed stage.
//
// It sits between an input channel (in_req/in_ack, with the operands bundled
// alongside) and an output channel (out_req/out_ack), and drives the stage's
// function block through start (its local clock: 0 = precharge, 1 =
// evaluate) and reads back done / idle (completion of evaluation /
// completion of precharge). One operation runs:
//   1. in_req rises: load the input latch, raise in_ack and start.
//   2. wait for done (the data-dependent evaluation time), then raise out_req.
//   3. wait for out_ack, then drop out_req and start (precharge begins).
//   4. wait for idle and out_ack low, then accept the next input.
// On the input side in_ack drops as soon as in_req has dropped, so the
// sender can prepare the next operand while this stage is still busy; the
// next operand is only taken once the stage is back in IDLE.
// The sequence of Req, Start, Done and Ack follows the design's description
// of its self-timed pipeline stage and of the four-phase protocol.
//
// Implementation choice: the controller is a small state machine that
// samples req, ack and done on a free-running clock clk, rather than an
// asynchronous circuit of C-elements; done is thus seen within one clk
// period of its arrival, and the evaluation time appears as a number of
// clk cycles spent in EVAL. rst_n is an active-low asynchronous reset.
//
// Timing: load is combinational (high in the cycle the operands are
// accepted); in_ack, start and out_req are registered.
module hs_ctrl (
  input  logic clk,
  input  logic rst_n,
  // input channel
  input  logic in_req,
  output logic in_ack,
  // output channel
  output logic out_req,
  input  logic out_ack,
  // function block
  output logic load,
  output logic start,
  input  logic done,
  input  logic idle
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,  // waiting for an input request
    S_EVAL  = 2'd1,  // start high, waiting for done
    S_OUT   = 2'd2,  // out_req high, waiting for out_ack
    S_PRECH = 2'd3   // start low, waiting for idle and out_ack low
  } state_t;

  state_t state;

  assign load = (state == S_IDLE) && in_req && !in_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      in_ack  <= 1'b0;
      out_req <= 1'b0;
      start   <= 1'b0;
    end else begin
      // input side return to zero
      if (in_ack && !in_req) in_ack <= 1'b0;
      unique case (state)
        S_IDLE: if (load) begin
          in_ack <= 1'b1;
          start  <= 1'b1;
          state  <= S_EVAL;
        end
        S_EVAL: if (done) begin
          out_req <= 1'b1;
          state   <= S_OUT;
        end
        S_OUT: if (out_ack) begin
          out_req <= 1'b0;
          start   <= 1'b0;
          state   <= S_PRECH;
        end
        S_PRECH: if (idle && !out_ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Four-phase rules of the two channels.
  // The sender holds in_req until it has been acknowledged.
  a_in_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    in_req && !in_ack |=> in_req);
  // The receiver raises out_ack only in answer to out_req.
  a_out_ack_answers: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(out_ack) |-> out_req);
  // The result is never precharged while it is being offered.
  a_start_held: assert property (@(posedge clk) disable iff (!rst_n)
    out_req |-> start);
endmodule
