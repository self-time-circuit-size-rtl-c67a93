// fpa_pkg: types of the single-precision floating-point adder.
//
// fpa_flags_t gathers the exception and status flags the adder reports next
// to its result: an invalid operation (a NaN operand, or infinities of
// opposite sign), an infinite operand, exponent overflow and underflow of the
// result, and a subnormal operand on either input.
package fpa_pkg;

  typedef struct packed {
    logic invalid;      // result is NaN
    logic infinite;     // an operand is infinite (result infinite unless invalid)
    logic overflow;     // rounded result too large: result is +/- infinity
    logic underflow;    // normalised result below the normal range: result is +/- 0
    logic x_subnormal;  // operand x is subnormal
    logic y_subnormal;  // operand y is subnormal
  } fpa_flags_t;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

endpackage
