// sbnr_pkg: types and constants shared by the signed-binary (SBNR) complex
// +-1 multiplier.
//
// A signed-binary digit takes a value in {-1, 0, +1} and is held in
// sign-magnitude form, two bits {sign, magn}:
//   +1 = 2'b01, 0 = 2'b00, -1 = 2'b11.
// The pair 2'b10 ("minus zero") appears when a zero digit is negated by
// flipping its sign bit. Every consumer in this design treats it as 0.
// An N-digit number is a packed array of digits, digit 0 least significant.
//
// A PN chip is a single bit: 0 stands for +1 and 1 for -1 (this bit mapping
// is a choice of this design).
package sbnr_pkg;

  // Default operand width: the 8-bit configuration is the main one.
  localparam int unsigned N_DEFAULT = 8;

  typedef struct packed {
    logic sign;
    logic magn;
  } sb_digit_t;

  // Controls produced by the PN logic.
  typedef struct packed {
    logic inv_sum;  // negate the sum-branch SB number  (Logic 1)
    logic inv_dif;  // negate the difference-branch SB number (Logic 1)
    logic swap;     // 1: A <- +-(a-b), B <- +-(a+b); 0: straight (Logic 2)
  } pn_ctl_t;

  // Numeric value of one digit, for assertions and testbenches.
  function automatic int digit_value(sb_digit_t d);
    if (!d.magn) return 0;
    return d.sign ? -1 : 1;
  endfunction

endpackage
