// pn_logic: decodes the complex PN chip into the multiplier's controls.
//
// (a + jb)(PN_re + jPN_im) has real part a PN_re - b PN_im and imaginary
// part a PN_im + b PN_re, so each output is one of +-(a+b), +-(a-b):
//   PN_re PN_im |   A        B
//    +1    +1   |  a-b      a+b
//    +1    -1   |  a+b    -(a-b)
//    -1    +1   | -(a+b)   a-b
//    -1    -1   | -(a-b)  -(a+b)
// The sum branch natively yields -(a+b) and the difference branch -(a-b);
// each is negated when its sign is +, and the two results are crossed when
// PN_re = PN_im:
//   inv_sum = (PN_re == +1), inv_dif = (PN_im == +1), swap = (PN_re == PN_im).
// inv_sum/inv_dif form "Logic 1", swap "Logic 2". A chip bit of 0 means +1
// and 1 means -1 (this design's encoding).
//
// Purely combinational.
module pn_logic
  import sbnr_pkg::*;
(
  input  logic    pn_re,
  input  logic    pn_im,
  output pn_ctl_t ctl
);

  always_comb begin
    ctl.inv_sum = ~pn_re;
    ctl.inv_dif = ~pn_im;
    ctl.swap    = ~(pn_re ^ pn_im);
  end

endmodule
