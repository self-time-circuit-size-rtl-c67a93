// tb_st_adder_top: end-to-end testbench of the self-timed adder stage and
// the floating-point adder, with every parameter of the top at its default.
//
// Self-timed adder: a sender pushes random operand words (plus directed
// words with no propagate bit and with a carry rippling through every bit)
// through the four-phase input channel, with random gaps; a receiver checks
// each result on the output channel against a + b + cin and acknowledges it
// after a random delay. The time from start to out_req, in clock cycles, is
// checked against the completion time of the adder worked out here from the
// gate delays and the ripple (operand latch delay plus the longest active
// path), allowing for the sampling of done by the clock. Counted, and each
// must occur: a receiver stall, a request waiting while the stage is busy, a
// request waiting for the precharge to finish, the fastest and the slowest
// completion (they must differ in cycles).
//
// Floating-point adder: a few sums whose results are known exactly.
module tb_st_adder_top;
  import st_pkg::*;
  import fpa_pkg::*;

  localparam int N      = 4;      // the top's default width
  localparam int T_PS   = 20;     // sampling clock period
  localparam int NOPS   = 2000;
  localparam int INF    = 1_000_000;

  logic         clk = 0, rst_n = 0;
  logic         add_in_req = 0, add_in_ack, add_out_req, add_out_ack = 0;
  logic [N-1:0] add_a = '0, add_b = '0, add_sum;
  logic         add_cin = 0, add_cout;
  logic [31:0]  fpa_x = '0, fpa_y = '0, fpa_z;
  fpa_flags_t   fpa_flags;

  int checks = 0, failures = 0;
  int n_stall = 0, n_busy = 0, n_prech = 0, n_full = 0, n_short = 0, n_done = 0;
  int cyc_min = INF, cyc_max = 0;

  st_adder_top dut (.*);

  always #(T_PS * 500 * 1fs) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int max2(int x, int y); return (x > y) ? x : y; endfunction
  function automatic int min2(int x, int y); return (x < y) ? x : y; endfunction

  // completion time of the adder after start, in ps
  function automatic int t_complete(logic [N-1:0] va, logic [N-1:0] vb, bit vc);
    int tc = D_LATCH_PS, tco, tsum, worst = 0;
    bit c = vc;
    for (int i = 0; i < N; i++) begin
      if (va[i] == vb[i]) tco = min2(D_LATCH_PS + D_AND_PS,
                                     (c == va[i]) ? max2(tc, D_LATCH_PS + D_OR_PS) : INF) + D_AO21_PS;
      else                tco = max2(tc, D_LATCH_PS + D_OR_PS) + D_AO21_PS;
      if (va[i] == vb[i] && vb[i] == c) tsum = max2(tc, D_LATCH_PS) + D_SUM_PS;
      else                              tsum = tco + D_SUM_PS;
      worst = max2(worst, max2(tsum, tco + D_OR_PS));
      c  = (va[i] & vb[i]) | (c & (va[i] ^ vb[i]));
      tc = tco;
    end
    return worst;
  endfunction

  // expected results, in order
  logic [N:0] exp_q [$];
  int         lat_q [$];

  initial begin : watchdog
    repeat (NOPS * 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sender
  initial begin
    logic [N-1:0] va, vb;
    bit vc;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < NOPS; k++) begin
      va = N'($urandom); vb = N'($urandom); vc = 1'($urandom);
      if (k % 10 == 3) begin vb = ~va; vc = 1'b1; end                    // full ripple
      if (k % 10 == 7) begin vb = va; end                                // no propagate bit
      repeat ($urandom_range(0, 3)) @(posedge clk);
      add_a <= va; add_b <= vb; add_cin <= vc; add_in_req <= 1;
      exp_q.push_back((N+1)'(va) + (N+1)'(vb) + (N+1)'(vc));
      lat_q.push_back(t_complete(va, vb, vc));
      if ((va ^ vb) == '1) n_full++;
      if ((va ^ vb) == '0) n_short++;
      @(posedge clk);
      while (!add_in_ack) @(posedge clk);
      add_in_req <= 0;
      @(posedge clk);
      while (add_in_ack) @(posedge clk);
    end
  end

  // monitor of busy / precharge waits and evaluation time
  int cyc;
  always @(posedge clk) if (rst_n) begin
    if (add_in_req && !add_in_ack && (dut.start || !dut.idle)) n_busy++;
    if (add_in_req && !add_in_ack && !dut.start && !dut.idle) n_prech++;
    if (dut.start && !add_out_req) cyc <= cyc + 1;
    else if (!dut.start)           cyc <= 0;
  end

  // receiver
  initial begin
    int lat, dly, c;
    logic [N:0] e;
    while (n_done < NOPS) begin
      @(posedge clk);
      if (add_out_req && !add_out_ack) begin
        e   = exp_q.pop_front();
        lat = lat_q.pop_front();
        c   = cyc;
        check({add_cout, add_sum} == e, $sformatf("result %0d expected %0d", {add_cout, add_sum}, e));
        check(c * T_PS >= lat && (c - 3) * T_PS < lat,
              $sformatf("evaluation took %0d cycles for a %0d ps completion", c, lat));
        cyc_min = min2(cyc_min, c);
        cyc_max = max2(cyc_max, c);
        dly = $urandom_range(0, 3);
        if (dly > 0) n_stall++;
        repeat (dly) @(posedge clk);
        check(add_out_req && {add_cout, add_sum} == e, "result held until acknowledged");
        add_out_ack <= 1;
        while (add_out_req) @(posedge clk);
        check(add_sum == '0 || !dut.start, "result precharges after acknowledge");
        add_out_ack <= 0;
        n_done++;
      end
    end
    finish_test();
  end

  task automatic fpa_check(input logic [31:0] a, input logic [31:0] b, input logic [31:0] r);
    fpa_x = a; fpa_y = b;
    #(1ps);
    check(fpa_z == r, $sformatf("fpa %h + %h = %h, expected %h", a, b, fpa_z, r));
  endtask

  task automatic finish_test();
    fpa_check(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);   // 1 + 1 = 2
    fpa_check(32'h3FC0_0000, 32'h4010_0000, 32'h4070_0000);   // 1.5 + 2.25 = 3.75
    fpa_check(32'h4120_0000, 32'hC0A0_0000, 32'h40A0_0000);   // 10 - 5 = 5
    fpa_check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf - inf = NaN
    check(fpa_flags.invalid, "fpa invalid flag");
    fpa_check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);   // overflow
    check(fpa_flags.overflow, "fpa overflow flag");
    $display("eval cycles %0d..%0d, stalls %0d, busy waits %0d, precharge waits %0d, full ripple %0d, no propagate %0d",
             cyc_min, cyc_max, n_stall, n_busy, n_prech, n_full, n_short);
    check(n_done == NOPS, "all operations delivered");
    check(n_stall > 0, "receiver stall exercised");
    check(n_busy > 0, "request while busy exercised");
    check(n_prech > 0, "request waiting for precharge exercised");
    check(n_full > 0 && n_short > 0, "longest and shortest carry chains exercised");
    check(cyc_max > cyc_min, "completion time depends on the operands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
