// tb_st_full_adder: self-checking testbench of the one-bit dual-rail domino
// full adder.
//
// For each of the eight input words (a, b, cin) the adder is precharged, the
// three dual-rail operands are applied together with phi = 1, and the rails
// are watched picosecond by picosecond. Checked, against values worked out
// here:
//   - sum and carry out equal a xor b xor cin and the majority of a, b, cin,
//     on the correct rail, and the other rail never rises;
//   - the time at which carry out, sum and Done rise, from a model of the
//     active path: generate/kill bits resolve the carry through the AND gate,
//     propagate bits through the OR gate, and Done follows the carry by one
//     OR gate; sum follows the carry by one sum gate, except when all three
//     inputs are equal, where the a*b*c term fires directly;
//   - with a and b valid but the carry in still empty, a generate or kill bit
//     completes (Done rises) and a propagate bit waits;
//   - precharge returns every output to 0.
module tb_st_full_adder;
  import st_pkg::*;

  localparam int INF = 1_000_000;

  logic phi;
  dr_t  a, b, cin, s, cout;
  logic done;
  int   checks = 0, failures = 0;
  int   n_prop_wait = 0, n_gk_early = 0;

  st_full_adder dut (.phi(phi), .a(a), .b(b), .cin(cin), .s(s), .cout(cout), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int max2(int x, int y); return (x > y) ? x : y; endfunction
  function automatic int min2(int x, int y); return (x < y) ? x : y; endfunction

  // expected rise time of the carry out (carry in arriving at time tc)
  function automatic int t_cout(bit va, bit vb, bit vc, int tc);
    if (va == vb) return min2(D_AND_PS, (vc == va) ? max2(tc, D_OR_PS) : INF) + D_AO21_PS;
    return max2(tc, D_OR_PS) + D_AO21_PS;
  endfunction

  function automatic int t_sum(bit va, bit vb, bit vc, int tc);
    if (va == vb && vb == vc) return tc + D_SUM_PS;
    return t_cout(va, vb, vc, tc) + D_SUM_PS;
  endfunction

  task automatic precharge();
    phi = 0; a = '0; b = '0; cin = '0;
    #(400 * 1ps);
    check(s == '0 && cout == '0 && done == 0, "precharge clears all outputs");
  endtask

  initial begin : watchdog
    #(200000 * 1ps);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ts, tco, td;
    bit va, vb, vc, es, eco;
    phi = 0; a = '0; b = '0; cin = '0;
    #(500 * 1ps);
    for (int v = 0; v < 8; v++) begin
      {va, vb, vc} = 3'(v);
      es  = va ^ vb ^ vc;
      eco = (va & vb) | (vc & (va ^ vb));
      precharge();
      phi = 1;
      a = dr_encode(1'b1, va); b = dr_encode(1'b1, vb); cin = dr_encode(1'b1, vc);
      ts = -1; tco = -1; td = -1;
      for (int t = 1; t <= 600; t++) begin
        #(1ps);
        if (ts  < 0 && dr_valid(s))    ts  = t;
        if (tco < 0 && dr_valid(cout)) tco = t;
        if (td  < 0 && done)           td  = t;
        if (dr_illegal(s) || dr_illegal(cout)) begin
          check(0, $sformatf("illegal code, input %0d", v));
          break;
        end
      end
      check(s.t == es && s.f == !es, $sformatf("sum of %0d", v));
      check(cout.t == eco && cout.f == !eco, $sformatf("carry of %0d", v));
      check(tco == t_cout(va, vb, vc, 0),
            $sformatf("carry time of %0d: %0d ps, model %0d", v, tco, t_cout(va, vb, vc, 0)));
      check(ts == t_sum(va, vb, vc, 0),
            $sformatf("sum time of %0d: %0d ps, model %0d", v, ts, t_sum(va, vb, vc, 0)));
      check(td == t_cout(va, vb, vc, 0) + D_OR_PS,
            $sformatf("done time of %0d: %0d ps", v, td));
      $display("input %0d%0d%0d: carry %0d ps, sum %0d ps, done %0d ps", va, vb, vc, tco, ts, td);
    end
    // operands valid, carry in still empty
    for (int v = 0; v < 4; v++) begin
      {va, vb} = 2'(v);
      precharge();
      phi = 1;
      a = dr_encode(1'b1, va); b = dr_encode(1'b1, vb); cin = '0;
      #(600 * 1ps);
      if (va == vb) begin
        check(done && cout.t == va && cout.f == !va, $sformatf("early carry, a=b=%0d", va));
        n_gk_early++;
      end else begin
        check(!done && cout == '0 && s == '0, "propagate bit waits for carry in");
        n_prop_wait++;
        cin = dr_encode(1'b1, 1'b1);
        #(400 * 1ps);
        check(done && cout.t && s.f, "propagate bit completes after carry in");
      end
    end
    check(n_gk_early == 2 && n_prop_wait == 2, "every carry case exercised");
    precharge();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
