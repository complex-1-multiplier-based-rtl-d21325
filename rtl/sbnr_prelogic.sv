// sbnr_prelogic: the prelogic stage shared by both branches.
//
// Each bit pair is mapped straight to a signed-binary digit x_i = 1 - y_i,
// where y_i is the bitwise "initial sum" in {0, 1, 2}, so that no carry is
// formed. In sign-magnitude form:
//   sum branch (a, b):         sign = a_i & b_i,   magn = ~(a_i ^ b_i)
//   difference branch (a, ~b): sign = a_i & ~b_i,  magn =   a_i ^ b_i
// The two magnitudes are complements of each other, so one XOR serves both
// branches. These are the carry generate and inverted propagate signals of
// a conventional adder.
//
// With these digits, for N-bit two's-complement a and b and V() the value of
// an SB number whose top digit weighs -2^(N-1):
//   a + b = -(V(x_sum) + 1)        a - b = -V(x_dif)
//
// Interface: a, b are N-bit two's-complement inputs; x_sum and x_dif are
// N-digit SB numbers. Purely combinational, one gate level.
module sbnr_prelogic
  import sbnr_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  output sb_digit_t [N-1:0] x_sum,
  output sb_digit_t [N-1:0] x_dif
);

  logic [N-1:0] p;  // carry propagate a_i ^ b_i
  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      x_sum[i].sign = a[i] & b[i];
      x_sum[i].magn = ~p[i];
      x_dif[i].sign = a[i] & ~b[i];
      x_dif[i].magn = p[i];
    end
  end

endmodule
