// sb_cond_inverter: conditional negation of a signed-binary number.
//
// In sign-magnitude signed-binary form -x is x with every sign bit flipped,
// so negation costs one XOR per digit and no carry. When inv is 1 the sign
// bits are inverted; magnitudes pass unchanged. A zero digit becomes the
// "minus zero" pair 2'b10, which the converter reads as 0.
//
// Interface: d_in, d_out are N-digit SB numbers; inv is the PN-derived
// control. Purely combinational.
module sb_cond_inverter
  import sbnr_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  sb_digit_t [N-1:0] d_in,
  input  logic              inv,
  output sb_digit_t [N-1:0] d_out
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      d_out[i].sign = d_in[i].sign ^ inv;
      d_out[i].magn = d_in[i].magn;
    end
  end

endmodule
