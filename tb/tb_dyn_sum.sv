// tb_dyn_sum: self-checking testbench of the domino sum gate (a+b+c)*d + a*b*c gate.
//
// For every input combination the gate is first precharged (phi = 0, all
// inputs 0), then the inputs are applied with phi = 1. The output is checked
// to stay 0 just before the gate delay has elapsed, and to equal the expected
// Boolean value (worked out here with integer arithmetic) just after it.
// With phi = 0 the output must be 0 whatever the inputs are. Finally a
// precharge after an evaluation that raised the output must bring it back to
// 0 after the gate delay.
module tb_dyn_sum;
  import st_pkg::*;

  localparam int unsigned DLY = D_SUM_PS;

  logic phi, a, b, c, d, y;
  int checks = 0, failures = 0;

  dyn_sum dut (.phi(phi), .a(a), .b(b), .c(c), .d(d), .y(y));

  function automatic bit expected(input int a, input int b, input int c, input int d);
    return bit'(((a + b + c) >= 1 && d) || (a + b + c) == 3);
  endfunction

  task automatic check(input bit got, input bit exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #(2000000 * 1ps);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phi = 0; a = 0; b = 0; c = 0; d = 0;
    #(1000 * 1ps);
    for (int v = 0; v < 16; v++) begin
      // precharge
      phi = 0; a = 0; b = 0; c = 0; d = 0;
      #(500 * 1ps);
      check(y, 1'b0, $sformatf("precharged before vector %0d", v));
      // inputs without evaluate: stays precharged
      {a, b, c, d} = 4'(v);
      #((DLY + 20) * 1ps);
      check(y, 1'b0, $sformatf("phi=0 vector %0d", v));
      // evaluate
      phi = 1;
      #((DLY - 3) * 1ps);
      check(y, 1'b0, $sformatf("before delay, vector %0d", v));
      #(6 * 1ps);
      check(y, expected(int'(a), int'(b), int'(c), int'(d)), $sformatf("evaluate vector %0d", v));
      // precharge again: output returns to 0 after the delay
      phi = 0;
      #((DLY + 3) * 1ps);
      check(y, 1'b0, $sformatf("precharge after vector %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
