// sb_plus_one: carry-free addition of +1 to a signed-binary number.
//
// A transfer t_i in {0, 1} moves into each position; digit i of the result
// is d_i = x_i + t_i - 2 t_{i+1}, chosen so that it stays in {-1, 0, +1}:
//   position 0 adds the constant 1 and passes t_1 = 1 unless x_0 = -1;
//   position i >= 1 passes t_{i+1} = 1 exactly when x_i = +1.
// Each output digit therefore depends on two neighbouring input digits only
// and is ready after two gate levels, with no carry chain. In sign-magnitude
// form, for i >= 1: sign = magn(x_i) & ~t_i, magn = ~(~magn(x_i) ^ t_i);
// digit 0 is -1 when x_0 = 0 and 0 otherwise.
//
// Outputs: d (digits 0..N-1), d_top (digit N, always >= 0, equal to t_N),
// so that T(d) + 2^N d_top = T(x) + 1 with all weights positive.
//
// sign_fix = t_{N-1} ^ t_N. The converter that follows weights the top digit
// by -2^(N-1); a transfer into that digit then counts with the wrong sign,
// and the N-digit result differs from V(x) + 1 by 2^N (t_{N-1} - t_N).
// Toggling the converter's sign bit by sign_fix removes that difference
// modulo 2^(N+1). The digit equations follow the source architecture;
// sign_fix is an addition of this design that makes the (N+1)-bit result
// right for every input.
//
// Purely combinational. N must be at least 3.
module sb_plus_one
  import sbnr_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  sb_digit_t [N-1:0] x,
  output sb_digit_t [N-1:0] d,
  output logic              d_top,
  output logic              sign_fix
);

  logic [N:0] t;  // t[i]: transfer into position i

  assign t[0] = 1'b1;
  assign t[1] = ~x[0].sign;                        // x_0 != -1
  for (genvar i = 1; i < N; i++) begin : g_transfer
    assign t[i+1] = x[i].magn & ~x[i].sign;        // x_i == +1
  end

  // digit 0: x_0 + 1 - 2 t_1 is -1 for x_0 = 0, else 0
  assign d[0].sign = ~x[0].magn;
  assign d[0].magn = ~x[0].magn;
  for (genvar i = 1; i < N; i++) begin : g_digit
    assign d[i].sign = x[i].magn & ~t[i];
    assign d[i].magn = ~(~x[i].magn ^ t[i]);
  end

  assign d_top    = t[N];
  assign sign_fix = t[N-1] ^ t[N];

  initial assert (N >= 3) else $error("sb_plus_one: N must be at least 3");

endmodule
