// cmul_pm1_sbnr: complex +-1 multiplier in signed-binary (SBNR) form.
//
// Computes A + jB = (a + jb)(PN_re + jPN_im) with PN_re, PN_im in {-1, +1},
// the scrambling/descrambling product of a CDMA transceiver. Each output is
// one of +-(a+b), +-(a-b). Rather than forming a+b and a-b in two's
// complement and then negating them (two carry chains in series), the
// operands are mapped bit by bit to signed-binary digits, where negation is
// a flip of the sign bits, and a single carry chain per branch converts the
// result back to two's complement:
//
//   a, b --> prelogic --+--> x_sum --> "+1" --> cond. invert --> converter --\
//                       |                                                    switch --> A, B
//                       +--> x_dif ----------> cond. invert --> converter --/
//   pn_re, pn_im --> PN logic: inv_sum, inv_dif (Logic 1), swap (Logic 2)
//
// Sum branch:        -(a+b) = V(x_sum) + 1, built carry-free by sb_plus_one.
// Difference branch: -(a-b) = V(x_dif).
// The sum branch's sign bit is corrected by sb_plus_one's sign_fix, an
// addition of this design that makes the (N+1)-bit result exact.
//
// Interface: a, b are N-bit two's complement; pn_re/pn_im are chip bits
// (0 = +1, 1 = -1); A, B are (N+1)-bit two's complement. The one product that
// does not fit is -(a+b) = +2^N for a = b = -2^(N-1); it wraps to -2^N.
// Purely combinational, no clock: one prelogic level, two levels for "+1",
// one for the inverter, N carry stages and the switch.
module cmul_pm1_sbnr
  import sbnr_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         pn_re,
  input  logic         pn_im,
  output logic [N:0]   A,
  output logic [N:0]   B
);

  sb_digit_t [N-1:0] x_sum, x_dif;   // prelogic outputs
  sb_digit_t [N-1:0] x_sum_p1;       // x_sum + 1
  sb_digit_t [N-1:0] w_sum, w_dif;   // after conditional inversion
  logic              sign_fix;
  logic [N:0]        r_sum, r_dif;   // +-(a+b), +-(a-b)
  pn_ctl_t           ctl;

  sbnr_prelogic #(.N(N)) u_prelogic (
    .a     (a),
    .b     (b),
    .x_sum (x_sum),
    .x_dif (x_dif)
  );

  sb_plus_one #(.N(N)) u_plus_one (
    .x        (x_sum),
    .d        (x_sum_p1),
    .d_top    (),              // folded into sign_fix
    .sign_fix (sign_fix)
  );

  pn_logic u_pn_logic (
    .pn_re (pn_re),
    .pn_im (pn_im),
    .ctl   (ctl)
  );

  sb_cond_inverter #(.N(N)) u_inv_sum (
    .d_in  (x_sum_p1),
    .inv   (ctl.inv_sum),
    .d_out (w_sum)
  );

  sb_cond_inverter #(.N(N)) u_inv_dif (
    .d_in  (x_dif),
    .inv   (ctl.inv_dif),
    .d_out (w_dif)
  );

  sb2tc_converter #(.N(N)) u_conv_sum (
    .d        (w_sum),
    .sign_fix (sign_fix),
    .r        (r_sum)
  );

  sb2tc_converter #(.N(N)) u_conv_dif (
    .d        (w_dif),
    .sign_fix (1'b0),
    .r        (r_dif)
  );

  output_switch #(.N(N)) u_switch (
    .r_sum (r_sum),
    .r_dif (r_dif),
    .swap  (ctl.swap),
    .A     (A),
    .B     (B)
  );

endmodule
