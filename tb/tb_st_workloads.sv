// tb_st_workloads: average completion time of the one-bit self-timed adder
// under input distributions.
//
// The circuit studied is one enabled input latch feeding one dual-rail
// domino full adder with completion detection (an st_input_latch of three
// bits and an st_rca of one bit). Its completion time depends on the input
// word {A0, B0, C0} (A0 the most significant bit), so its average depends on
// how often each of the eight words appears. Two distributions are run:
//   - binomial: P(k) = C(7, k) / 128 for word value k, the distribution the
//     sizing method is demonstrated with;
//   - uniform: P(k) = 1/8, as a reference.
// Each distribution is sampled DRAWS times with $urandom. For every draw the
// latch is loaded, start is raised, and the time from the rise of start to
// the rise of done is measured in picoseconds.
//
// Checked against values worked out here:
//   - the sum and carry equal A0 + B0 + C0;
//   - each measured time equals the gate-delay model (latch delay plus the
//     carry and sum paths the word sensitises);
//   - under the binomial distribution every one of the eight words is drawn
//     at least once (the rarest has probability 1/128);
//   - the sample mean of the completion time lies within 2 % of the exact
//     expectation sum_k P(k) * D(k);
//   - the binomial mean is below the worst-case completion time, which is
//     what a clocked design would have to budget for every word.
// The means are printed in picoseconds and in units of tau = 17.52 ps, the
// delay unit of the gate library the delays come from.
module tb_st_workloads;
  import st_pkg::*;

  localparam int INF   = 1_000_000;
  localparam int DRAWS = 3000;
  localparam real TAU_PS = 17.52;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int max2(int x, int y); return (x > y) ? x : y; endfunction
  function automatic int min2(int x, int y); return (x < y) ? x : y; endfunction

  // completion time of word k = {a, b, c}, from the rise of start
  function automatic int model_ps(int k);
    bit a = k[2], b = k[1], c = k[0];
    int tco, tsum;
    if (a == b) tco = min2(D_AND_PS, (c == a) ? D_OR_PS : INF) + D_AO21_PS;
    else        tco = D_OR_PS + D_AO21_PS;
    if (a == b && b == c) tsum = D_SUM_PS;
    else                  tsum = tco + D_SUM_PS;
    return D_LATCH_PS + max2(tsum, tco + D_OR_PS);
  endfunction

  // binomial weights C(7, k), out of 128
  function automatic int binom7(int k);
    int w = 1;
    for (int i = 0; i < k; i++) w = w * (7 - i) / (i + 1);
    return w;
  endfunction

  logic clk = 0, rst_n = 0, load = 0, start = 0;
  logic [2:0] d = '0;
  dr_t  q [3];
  dr_t  s [1], cout;
  logic done, idle;

  always #(10 * 1ps) clk = ~clk;

  st_input_latch #(.W(3)) u_lat (.clk(clk), .rst_n(rst_n), .load(load), .d(d),
                                 .start(start), .q(q));
  // q[2] = A0, q[1] = B0, q[0] = C0
  st_rca #(.N(1)) u_fa (.phi(start), .a(q[2:2]), .b(q[1:1]), .cin(q[0]), .s(s),
                        .cout(cout), .done(done), .idle(idle));

  initial begin : watchdog
    #(20000000 * 1ps);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int td;   // completion time of the last add, in ps

  // one add of word k; leaves the measured completion time in td
  task automatic run_word(input int k);
    realtime t0;
    @(negedge clk);
    d = 3'(k);
    load = 1;
    @(negedge clk);
    load = 0;
    start = 1;
    t0 = $realtime;
    td = -1;
    fork
      begin
        @(posedge done);
        td = int'(($realtime - t0) / 1ps);
      end
      #(2000 * 1ps);
    join_any
    disable fork;
    #(100 * 1ps);
    check({cout.t, s[0].t} == 2'(k[2]) + 2'(k[1]) + 2'(k[0]),
          $sformatf("word %03b: sum %0d carry %0d", 3'(k), s[0].t, cout.t));
    check(td == model_ps(k), $sformatf("word %03b: completion %0d ps, model %0d ps",
                                       3'(k), td, model_ps(k)));
    start = 0;
    #(400 * 1ps);
    check(idle && !done, "idle after precharge");
  endtask

  initial begin
    int worst, n, cnt [8], wt [8];
    real mean, expect_ps, mean_binom;
    string dist_name;

    worst = 0;
    for (int k = 0; k < 8; k++) worst = max2(worst, model_ps(k));
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int di = 0; di < 2; di++) begin
      dist_name = (di == 0) ? "binomial" : "uniform";
      for (int k = 0; k < 8; k++) begin
        wt[k]  = (di == 0) ? binom7(k) : 16;      // both out of 128
        cnt[k] = 0;
      end
      mean = 0.0;
      expect_ps = 0.0;
      for (int k = 0; k < 8; k++) expect_ps += real'(wt[k]) * real'(model_ps(k)) / 128.0;
      for (int i = 0; i < DRAWS; i++) begin
        int r, k;
        r = int'($urandom_range(127));
        k = 0;
        while (r >= wt[k]) begin r -= wt[k]; k++; end
        cnt[k]++;
        run_word(k);
        mean += real'(td);
      end
      mean = mean / real'(DRAWS);
      for (int k = 0; k < 8; k++)
        $display("%s: word %03b drawn %0d times, completion %0d ps",
                 dist_name, 3'(k), cnt[k], model_ps(k));
      $display("%s: mean completion %0.1f ps (%0.2f tau), expected %0.1f ps, worst case %0d ps",
               dist_name, mean, mean / TAU_PS, expect_ps, worst);
      check(mean > 0.98 * expect_ps && mean < 1.02 * expect_ps,
            $sformatf("%s sample mean %0.1f ps near expectation %0.1f ps", dist_name, mean, expect_ps));
      if (di == 0) begin
        mean_binom = mean;
        n = 0;
        for (int k = 0; k < 8; k++) if (cnt[k] > 0) n++;
        check(n == 8, $sformatf("binomial draws covered %0d of 8 words", n));
        check(mean < real'(worst), "binomial mean below worst case");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
