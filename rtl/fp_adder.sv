// fp_adder: IEEE-754 single-precision floating-point adder, round to nearest
// even, with exception flags.
//
// Data path (combinational, one result per set of operands):
//   1. Unpack and classify each operand: zero, subnormal, normal, infinity,
//      NaN. A subnormal operand has hidden bit 0 and exponent 1.
//   2. Order the operands by magnitude, so the larger one sets the result
//      exponent and sign, and the significand difference is never negative.
//   3. Align: shift the smaller significand right by the exponent difference,
//      keeping a guard bit, a round bit and a sticky bit (OR of every bit
//      shifted further out).
//   4. Add or subtract the significands (subtract when the signs differ).
//   5. Normalise: on a carry out shift right by one and increment the
//      exponent; otherwise shift left by the leading-zero count and decrement
//      the exponent.
//   6. Round to nearest even from the guard, round and sticky bits; a round
//      up that carries out of the significand increments the exponent again.
//   7. Exceptions: NaN operands and (+inf) + (-inf) give a quiet NaN; an
//      infinite operand gives infinity; a zero operand returns the other
//      operand unchanged; an exponent that reaches 255 gives infinity
//      (overflow); a normalised exponent below 1 gives a signed zero
//      (underflow, results below the normal range are flushed).
// These steps, the guard/round/sticky rounding and the per-operand
// classification follow the adder the design describes. Ordering by full
// magnitude (instead of by exponent only, with a negation of a negative
// difference afterwards) and flushing results below the normal range to zero
// are this design's choices.
//
// Interface: x, y (binary32) -> z (binary32), flags. Combinational.
module fp_adder
  import fpa_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [31:0] z,
  output fpa_flags_t  flags
);

  // operand fields and classes
  logic        sx, sy;
  logic [7:0]  ex, ey;
  logic [22:0] mx, my;
  logic        x_zero, y_zero, x_sub, y_sub, x_inf, y_inf, x_nan, y_nan;

  // ordered operands
  logic        swap, sb, eff_sub;
  logic [7:0]  eb, es;          // effective exponents (subnormal -> 1)
  logic [23:0] sig_b, sig_s;    // significands with hidden bit
  logic [8:0]  diff;
  logic [4:0]  shamt;

  // alignment and addition
  logic [49:0] shifted;
  logic [26:0] big27, small27;  // [26:3] significand, [2] guard, [1] round, [0] sticky
  logic [27:0] sum28;

  // normalisation and rounding
  logic [26:0] norm;
  logic [4:0]  lz;
  logic signed [9:0] e_norm, e_final;
  logic        inc;
  logic [24:0] mant25;
  logic [22:0] frac;
  logic        uflow, oflow;

  always_comb begin
    {sx, ex, mx} = x;
    {sy, ey, my} = y;
    x_zero = (ex == 8'd0)   && (mx == '0);
    y_zero = (ey == 8'd0)   && (my == '0);
    x_sub  = (ex == 8'd0)   && (mx != '0);
    y_sub  = (ey == 8'd0)   && (my != '0);
    x_inf  = (ex == 8'hFF)  && (mx == '0);
    y_inf  = (ey == 8'hFF)  && (my == '0);
    x_nan  = (ex == 8'hFF)  && (mx != '0);
    y_nan  = (ey == 8'hFF)  && (my != '0);

    // order by magnitude
    swap    = {ey, my} > {ex, mx};
    sb      = swap ? sy : sx;
    eff_sub = sx ^ sy;
    eb      = swap ? ey : ex;
    es      = swap ? ex : ey;
    sig_b   = swap ? {(ey != 8'd0), my} : {(ex != 8'd0), mx};
    sig_s   = swap ? {(ex != 8'd0), mx} : {(ey != 8'd0), my};
    if (eb == 8'd0) eb = 8'd1;
    if (es == 8'd0) es = 8'd1;

    // align the smaller significand (a shift of 26 or more leaves only sticky)
    diff    = {1'b0, eb} - {1'b0, es};
    shamt   = (diff > 9'd26) ? 5'd26 : diff[4:0];
    shifted = {sig_s, 26'd0} >> shamt;
    small27 = {shifted[49:24], |shifted[23:0]};
    big27   = {sig_b, 3'b000};

    // significand add / subtract
    sum28 = eff_sub ? ({1'b0, big27} - {1'b0, small27})
                    : ({1'b0, big27} + {1'b0, small27});

    // normalise
    lz = 5'd0;
    for (int i = 0; i <= 26; i++) begin
      if (sum28[i]) lz = 5'(26 - i);
    end
    if (sum28[27]) begin
      norm   = {sum28[27:2], sum28[1] | sum28[0]};
      e_norm = 10'(eb) + 10'sd1;
    end else begin
      norm   = sum28[26:0] << lz;
      e_norm = 10'(eb) - 10'(lz);
    end

    // round to nearest, ties to even
    inc     = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant25  = {1'b0, norm[26:3]} + 25'(inc);
    e_final = e_norm;
    frac    = mant25[22:0];
    if (mant25[24]) begin
      e_final = e_norm + 10'sd1;
      frac    = mant25[23:1];
    end
    uflow = (sum28 != '0) && (e_norm < 10'sd1);
    oflow = !uflow && (e_final >= 10'sd255);

    // result selection
    flags             = '0;
    flags.x_subnormal = x_sub;
    flags.y_subnormal = y_sub;
    if (x_nan || y_nan || (x_inf && y_inf && (sx != sy))) begin
      z             = QNAN;
      flags.invalid = 1'b1;
    end else if (x_inf || y_inf) begin
      z              = {x_inf ? sx : sy, 8'hFF, 23'd0};
      flags.infinite = 1'b1;
    end else if (x_zero && y_zero) begin
      z = {sx & sy, 31'd0};
    end else if (x_zero) begin
      z = y;
    end else if (y_zero) begin
      z = x;
    end else if (sum28 == '0) begin
      z = 32'd0;                       // exact cancellation gives +0
    end else if (uflow) begin
      z               = {sb, 31'd0};
      flags.underflow = 1'b1;
    end else if (oflow) begin
      z              = {sb, 8'hFF, 23'd0};
      flags.overflow = 1'b1;
    end else begin
      z = {sb, e_final[7:0], frac};
    end
  end
endmodule
