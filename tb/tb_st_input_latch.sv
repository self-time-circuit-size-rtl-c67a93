// tb_st_input_latch: self-checking testbench of the input latch.
//
// Random words are loaded with load = 1 on a rising clock edge, and words
// presented with load = 0 must be ignored. With start = 0 every output pair
// must be empty; after start rises every pair must carry the stored bit on
// the correct rail, no earlier than the latch delay and no later than just
// after it. Reset clears the stored word.
module tb_st_input_latch;
  import st_pkg::*;

  localparam int W = 9;

  logic         clk = 0, rst_n = 0, load = 0, start = 0;
  logic [W-1:0] d = '0, model = '0;
  dr_t          q [W];
  int           checks = 0, failures = 0;

  st_input_latch #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .start(start), .q(q));

  always #(500 * 1ps) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit all_empty();
    for (int i = 0; i < W; i++) if (q[i] != '0) return 0;
    return 1;
  endfunction

  function automatic bit rails_hold(logic [W-1:0] v);
    for (int i = 0; i < W; i++) if (q[i].t != v[i] || q[i].f != !v[i]) return 0;
    return 1;
  endfunction

  initial begin : watchdog
    #(1000000 * 1ps);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = 1;
    #(D_LATCH_PS * 2 * 1ps);
    check(rails_hold('0), "reset clears the stored word");
    start = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      d    = W'($urandom);
      load = (k % 3 != 2);
      if (load) model = d;
      @(negedge clk);
      load = 0;
      d    = ~d;                       // changes without load are ignored
      #(D_LATCH_PS * 1ps);
      check(all_empty(), "empty while start is low");
      start = 1;
      #((D_LATCH_PS - 2) * 1ps);
      check(all_empty(), "not valid before the latch delay");
      #(4 * 1ps);
      check(rails_hold(model), $sformatf("rails carry the stored word %0h", model));
      @(posedge clk);
      #(1ps);
      check(rails_hold(model), "word held while start is high");
      start = 0;
      #((D_LATCH_PS + 2) * 1ps);
      check(all_empty(), "empty again after start falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
