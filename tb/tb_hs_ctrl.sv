// tb_hs_ctrl: self-checking testbench of the four-phase handshake
// controller.
//
// A sender drives in_req with random gaps, a receiver answers out_req with
// random delays, and a model of the function block raises done a random
// number of cycles after start rises and drops idle while it is evaluating
// (idle comes back a few cycles after start falls). A scoreboard tracks the
// operations: each accepted request (load) must produce exactly one out_req
// and only after done; start must rise after load, stay high until out_ack
// and fall after it; no new load may happen before idle has returned; in_ack
// must follow in_req up and down. The cycle count from load to out_req must
// equal the evaluation time the block model chose plus the controller's fixed
// latency (start one cycle after load, out_req one cycle after done).
// Each situation (receiver stall, block still precharging when a new
// request is waiting, request raised while busy) is counted and must occur.
module tb_hs_ctrl;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack, out_req, out_ack = 0, load, start, done = 0, idle = 1;
  int   checks = 0, failures = 0;
  int   ops_in = 0, ops_out = 0;
  int   n_stall = 0, n_prech_wait = 0, n_busy_req = 0;
  int   eval_len, eval_cnt, since_load, exp_lat, prech_cnt;
  bit   started;

  hs_ctrl dut (.*);

  always #(500 * 1ps) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // function block model: done eval_len cycles after start, idle low
  // during evaluation and for 2 cycles after start falls
  always @(posedge clk) begin
    if (start && !started) begin
      started  <= 1;
      eval_cnt <= 0;
      idle     <= 0;
    end else if (start && started) begin
      eval_cnt <= eval_cnt + 1;
      if (eval_cnt + 1 >= eval_len) done <= 1;
    end else if (!start && started) begin
      done      <= 0;
      started   <= 0;
      prech_cnt <= 2;
    end else if (!idle) begin
      if (prech_cnt == 0) idle <= 1;
      else                prech_cnt <= prech_cnt - 1;
    end
  end

  // receiver: random acknowledge delay
  initial begin
    int dly;
    forever begin
      @(posedge clk);
      if (out_req && !out_ack) begin
        dly = $urandom_range(0, 4);
        if (dly > 0) n_stall++;
        repeat (dly) @(posedge clk);
        out_ack <= 1;
        ops_out++;
        wait (!out_req);
        @(posedge clk);
        out_ack <= 0;
      end
    end
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (load) begin
      check(idle && !start && !out_req, "load only when idle and precharged");
      ops_in++;
      since_load <= 0;
    end else begin
      since_load <= since_load + 1;
    end
    if (out_req && !$past(out_req)) begin
      check($past(done), "out_req raised only after done");
      check(since_load == exp_lat, $sformatf("load to out_req %0d cycles, expected %0d",
                                             since_load, exp_lat));
    end
    if ($fell(start)) check($past(out_ack), "start falls only after out_ack");
    if (in_req && !in_ack && (start || !idle)) n_busy_req++;
    if (!start && !idle && in_req && !in_ack) n_prech_wait++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 300; k++) begin
      repeat ($urandom_range(0, 6)) @(posedge clk);
      eval_len = $urandom_range(1, 8);
      exp_lat  = eval_len + 2;
      in_req <= 1;
      @(posedge clk);
      while (!in_ack) @(posedge clk);
      in_req <= 0;
      @(posedge clk);
      while (in_ack) @(posedge clk);
      // wait until this operation has been delivered before choosing the
      // next evaluation time
      while (ops_out < k + 1) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(ops_in == 300 && ops_out == 300, $sformatf("operations in %0d out %0d", ops_in, ops_out));
    check(n_stall > 0, "receiver stall exercised");
    check(n_prech_wait > 0, "request waiting for precharge exercised");
    check(n_busy_req > 0, "request while busy exercised");
    $display("stalls %0d, precharge waits %0d, busy requests %0d", n_stall, n_prech_wait, n_busy_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
