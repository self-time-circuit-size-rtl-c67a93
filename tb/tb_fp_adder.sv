// tb_fp_adder: self-checking testbench of the single-precision adder.
//
// The reference adds the two operands exactly, as integers in units of
// 2^-149 (the weight of the smallest subnormal) held in 300-bit vectors, and
// only then rounds once to nearest, ties to even. It applies the adder's
// stated rules for the special cases: NaN operands and opposite infinities
// give the quiet NaN 7FC00000, an infinity wins over a finite operand, a zero
// operand returns the other operand, exact cancellation gives +0, a result
// whose leading one lies below the normal range is flushed to a signed zero
// with the underflow flag, and an exponent reaching 255 after rounding gives
// infinity with the overflow flag.
//
// Operand sets: directed special cases, random bit patterns, operands with
// close exponents (cancellation and renormalisation), ties, results near the
// top and the bottom of the exponent range. Each mechanism (carry-out
// renormalisation, left renormalisation, round-up, round to even on a tie,
// overflow, underflow, invalid, subnormal operand) is counted and must occur.
module tb_fp_adder;
  import fpa_pkg::*;

  logic [31:0] x, y, z;
  fpa_flags_t  flags;
  int checks = 0, failures = 0;
  int n_carry = 0, n_left = 0, n_up = 0, n_tie_even = 0, n_ovf = 0, n_unf = 0;
  int n_inv = 0, n_sub = 0;

  fp_adder dut (.x(x), .y(y), .z(z), .flags(flags));

  typedef logic [299:0] wide_t;

  function automatic wide_t magnitude(logic [31:0] v);
    wide_t m;
    if (v[30:23] == 0) m = wide_t'(v[22:0]);
    else               m = wide_t'({1'b1, v[22:0]}) << (v[30:23] - 1);
    return m;
  endfunction

  // exact sum rounded once; also reports what happened
  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b,
                                          output fpa_flags_t f,
                                          output bit rounded_up, output bit tie_even,
                                          output int shift_kind);
    bit    sa = a[31], sb = b[31], sr;
    bit    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    bit    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    bit    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    bit    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    bit    a_zero = (a[30:0] == 0), b_zero = (b[30:0] == 0);
    wide_t ma, mb, mag, rem, half, m;
    int    p, e, emax;
    f = '0;
    rounded_up = 0; tie_even = 0; shift_kind = 0;
    f.x_subnormal = (a[30:23] == 0) && (a[22:0] != 0);
    f.y_subnormal = (b[30:23] == 0) && (b[22:0] != 0);
    if (a_nan || b_nan || (a_inf && b_inf && sa != sb)) begin f.invalid = 1; return 32'h7FC0_0000; end
    if (a_inf) begin f.infinite = 1; return a; end
    if (b_inf) begin f.infinite = 1; return b; end
    if (a_zero && b_zero) return {sa & sb, 31'd0};
    if (a_zero) return b;
    if (b_zero) return a;
    ma = magnitude(a); mb = magnitude(b);
    if (sa == sb)     begin mag = ma + mb; sr = sa; end
    else if (ma >= mb) begin mag = ma - mb; sr = sa; end
    else               begin mag = mb - ma; sr = sb; end
    if (mag == 0) return 32'd0;
    p = 0;
    for (int i = 0; i < 300; i++) if (mag[i]) p = i;
    emax = (ma >= mb) ? ((a[30:23] == 0) ? 1 : int'(a[30:23])) : ((b[30:23] == 0) ? 1 : int'(b[30:23]));
    e = p - 22;
    shift_kind = (e > emax) ? 1 : (e < emax) ? 2 : 0;
    if (e < 1) begin f.underflow = 1; return {sr, 31'd0}; end
    m   = mag >> (e - 1);
    rem = (e >= 2) ? (mag & ((wide_t'(1) << (e - 1)) - 1)) : '0;
    half = (e >= 2) ? (wide_t'(1) << (e - 2)) : '0;
    if (e >= 2 && (rem > half || (rem == half && m[0]))) begin
      m = m + 1;
      rounded_up = 1;
    end
    if (e >= 2 && rem == half && !m[0] && !rounded_up) tie_even = 1;
    if (e >= 2 && rem == half && rounded_up) tie_even = 1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) begin f.overflow = 1; return {sr, 8'hFF, 23'd0}; end
    return {sr, 8'(e), m[22:0]};
  endfunction

  task automatic apply(input logic [31:0] a, input logic [31:0] b);
    fpa_flags_t f;
    logic [31:0] r;
    bit up, tie;
    int sk;
    x = a; y = b;
    #(1ps);
    r = ref_add(a, b, f, up, tie, sk);
    checks++;
    if (z !== r || flags !== f) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h + %h: got %h flags %b, expected %h flags %b", a, b, z, flags, r, f);
    end
    if (sk == 1) n_carry++;
    if (sk == 2) n_left++;
    if (up) n_up++;
    if (tie) n_tie_even++;
    if (f.overflow) n_ovf++;
    if (f.underflow) n_unf++;
    if (f.invalid) n_inv++;
    if (f.x_subnormal || f.y_subnormal) n_sub++;
  endtask

  initial begin : watchdog
    #(10000000 * 1ps);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b;
    // directed cases
    apply(32'h3F80_0000, 32'h3F80_0000);   // 1 + 1
    apply(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1
    apply(32'h4B80_0000, 32'h3F80_0000);   // 2^24 + 1: tie, stays even
    apply(32'h4B80_0001, 32'h3F80_0000);   // tie, rounds up to even
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    apply(32'h0080_0000, 32'h8080_0001);   // underflow by cancellation
    apply(32'h0000_0001, 32'h0000_0001);   // two subnormals
    apply(32'h0000_0001, 32'h0000_0000);   // subnormal + 0
    apply(32'h8000_0000, 32'h8000_0000);   // -0 + -0
    apply(32'h7F80_0000, 32'hFF80_0000);   // inf - inf
    apply(32'h7F80_0000, 32'h3F80_0000);   // inf + 1
    apply(32'h7FC0_0001, 32'h3F80_0000);   // NaN + 1
    apply(32'h3F80_0001, 32'hBF80_0000);   // small difference
    apply(32'h4000_0000, 32'hB3FF_FFFF);   // borrow just below a power of two
    // random bit patterns
    for (int k = 0; k < 20000; k++) apply($urandom, $urandom);
    // close exponents, either sign
    for (int k = 0; k < 20000; k++) begin
      a = $urandom;
      b = $urandom;
      b[30:23] = 8'(int'(a[30:23]) + $urandom_range(0, 4) - 2);
      apply(a, b);
    end
    // near the top and the bottom of the range
    for (int k = 0; k < 5000; k++) begin
      a = $urandom; b = $urandom;
      a[30:23] = 8'($urandom_range(250, 254)); b[30:23] = 8'($urandom_range(248, 254));
      b[31] = a[31];
      apply(a, b);
      a = $urandom; b = $urandom;
      a[30:23] = 8'($urandom_range(0, 3)); b[30:23] = 8'($urandom_range(0, 3));
      apply(a, b);
    end
    // ties: operands whose exponents differ by 24 or 25
    for (int k = 0; k < 5000; k++) begin
      a = $urandom; b = 32'h0;
      a[30:23] = 8'($urandom_range(60, 190));
      b[31] = $urandom_range(0, 1);
      b[30:23] = a[30:23] - 8'($urandom_range(23, 25));
      apply(a, b);
    end
    $display("carry-out %0d, left shift %0d, round up %0d, ties %0d, overflow %0d, underflow %0d, invalid %0d, subnormal %0d",
             n_carry, n_left, n_up, n_tie_even, n_ovf, n_unf, n_inv, n_sub);
    checks++;
    if (n_carry == 0 || n_left == 0 || n_up == 0 || n_tie_even == 0 || n_ovf == 0 ||
        n_unf == 0 || n_inv == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
