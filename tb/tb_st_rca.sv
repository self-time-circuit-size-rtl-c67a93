// tb_st_rca: self-checking testbench of the N-bit dual-rail domino
// ripple-carry adder and its completion detection.
//
// Two adders are tested: the default four-bit one, over all 512 input words
// (a, b, carry in), and an eight-bit one over random words. For each word the
// adder is precharged, the dual-rail operands are applied with phi = 1, and
// the rails are watched picosecond by picosecond. Checked against values
// worked out here:
//   - the sum and carry out equal a + b + cin, each bit on the correct rail;
//   - done rises exactly when a timing model of the ripple predicts: a bit
//     whose operands are equal resolves its carry after an AND and an AND-OR
//     gate without waiting; a bit whose operands differ waits for its carry
//     in; every sum follows its carry by a sum gate;
//   - done is 0 until the last bit is valid, and idle returns after
//     precharge.
// The longest and shortest completion times seen are printed, and the test
// counts a failure unless both a word with no propagate bit and a word whose
// carry ripples through every bit were applied.
module tb_st_rca;
  import st_pkg::*;

  localparam int INF = 1_000_000;

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

  // completion time of an n-bit word, from the rise of phi and operands
  function automatic int t_done(int n, logic [63:0] va, logic [63:0] vb, bit vc);
    int tc = 0, tco, tsum, worst = 0;
    bit c = vc;
    for (int i = 0; i < n; i++) begin
      if (va[i] == vb[i]) tco = min2(D_AND_PS, (c == va[i]) ? max2(tc, D_OR_PS) : INF) + D_AO21_PS;
      else                tco = max2(tc, D_OR_PS) + D_AO21_PS;
      if (va[i] == vb[i] && vb[i] == c) tsum = tc + D_SUM_PS;
      else                              tsum = tco + D_SUM_PS;
      worst = max2(worst, max2(tsum, tco + D_OR_PS));
      c  = (va[i] & vb[i]) | (c & (va[i] ^ vb[i]));
      tc = tco;
    end
    return worst;
  endfunction

  // ---------------- four-bit adder ----------------
  localparam int N4 = 4;
  logic phi4, done4, idle4;
  dr_t  a4 [N4], b4 [N4], s4 [N4], cin4, cout4;
  st_rca #(.N(N4)) dut4 (.phi(phi4), .a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4),
                         .done(done4), .idle(idle4));

  // ---------------- eight-bit adder ----------------
  localparam int N8 = 8;
  logic phi8, done8, idle8;
  dr_t  a8 [N8], b8 [N8], s8 [N8], cin8, cout8;
  st_rca #(.N(N8)) dut8 (.phi(phi8), .a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8),
                         .done(done8), .idle(idle8));

  initial begin : watchdog
    #(5000000 * 1ps);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int td, tmin = INF, tmax = 0, exp_t;
    realtime t0;
    logic [4:0] got4;
    logic [8:0] got8;
    bit   seen_short = 0, seen_full_ripple = 0;

    // four-bit, exhaustive
    phi4 = 0; cin4 = '0;
    for (int i = 0; i < N4; i++) begin a4[i] = '0; b4[i] = '0; end
    phi8 = 0; cin8 = '0;
    for (int i = 0; i < N8; i++) begin a8[i] = '0; b8[i] = '0; end
    #(500 * 1ps);
    for (int v = 0; v < 512; v++) begin
      logic [3:0] va, vb;
      bit vc;
      {vc, vb, va} = 9'(v);
      phi4 = 0; cin4 = '0;
      for (int i = 0; i < N4; i++) begin a4[i] = '0; b4[i] = '0; end
      #(300 * 1ps);
      check(idle4 && !done4, "idle after precharge (4 bit)");
      phi4 = 1;
      cin4 = dr_encode(1'b1, vc);
      for (int i = 0; i < N4; i++) begin
        a4[i] = dr_encode(1'b1, va[i]);
        b4[i] = dr_encode(1'b1, vb[i]);
      end
      t0 = $realtime;
      td = -1;
      fork
        begin
          @(posedge done4);
          td = int'(($realtime - t0) / 1ps);
        end
        #(1500 * 1ps);
      join_any
      disable fork;
      #(200 * 1ps);
      for (int i = 0; i < N4; i++) got4[i] = s4[i].t;
      got4[4] = cout4.t;
      check(got4 == 5'(va) + 5'(vb) + 5'(vc),
            $sformatf("4-bit %0d+%0d+%0d = %0d", va, vb, vc, got4));
      for (int i = 0; i < N4; i++) check(s4[i].t != s4[i].f, "one sum rail high");
      exp_t = t_done(N4, 64'(va), 64'(vb), vc);
      check(td == exp_t, $sformatf("4-bit completion of %0d+%0d+%0d: %0d ps, model %0d",
                                   va, vb, vc, td, exp_t));
      tmin = min2(tmin, td);
      tmax = max2(tmax, td);
      if ((va ^ vb) == 4'b0000) seen_short = 1;
      if ((va ^ vb) == 4'b1111) seen_full_ripple = 1;
    end
    $display("4-bit completion time: shortest %0d ps, longest %0d ps", tmin, tmax);
    check(seen_short && seen_full_ripple, "shortest and longest carry chains applied");
    check(tmax > tmin, "completion time depends on the data");

    // eight-bit, random
    for (int k = 0; k < 300; k++) begin
      logic [7:0] va, vb;
      bit vc;
      va = 8'($urandom); vb = 8'($urandom); vc = 1'($urandom);
      if (k == 0) begin va = 8'hFF; vb = 8'h00; vc = 1'b1; end   // full ripple
      phi8 = 0; cin8 = '0;
      for (int i = 0; i < N8; i++) begin a8[i] = '0; b8[i] = '0; end
      #(300 * 1ps);
      check(idle8 && !done8, "idle after precharge (8 bit)");
      phi8 = 1;
      cin8 = dr_encode(1'b1, vc);
      for (int i = 0; i < N8; i++) begin
        a8[i] = dr_encode(1'b1, va[i]);
        b8[i] = dr_encode(1'b1, vb[i]);
      end
      exp_t = t_done(N8, 64'(va), 64'(vb), vc);
      #((exp_t - 1) * 1ps);
      check(!done8, "8-bit done not early");
      #(2 * 1ps);
      check(done8, $sformatf("8-bit done on time (%0d ps)", exp_t));
      for (int i = 0; i < N8; i++) got8[i] = s8[i].t;
      got8[8] = cout8.t;
      check(got8 == 9'(va) + 9'(vb) + 9'(vc), $sformatf("8-bit %0d+%0d+%0d", va, vb, vc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
