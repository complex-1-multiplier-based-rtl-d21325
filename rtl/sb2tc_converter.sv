// sb2tc_converter: signed-binary to two's-complement conversion.
//
// Converting a signed-binary number is the same job as adding two binary
// numbers, so this is a carry-propagate adder driven from the digits:
//   G_i = sign_i,  P_i = ~magn_i,  G_i is ignored when P_i = 1 (so the
//   "minus zero" pair 2'b10 acts as 0),
//   c_0 = 0,  c_{i+1} = ~P_i G_i | P_i c_i,
//   r_i = P_i ^ c_i                       for 0 <= i <= N-1,
//   r_N = ~P_{N-1} G_{N-1} | P_{N-1} ~c_{N-1}.
// The rule for r_N treats the top position as a pair of sign bits weighted
// -2^(N-1), so the adder yields an (N+1)-bit result that cannot overflow.
// The adder on its own gives 2^N - 1 - T(d) (the transformation y = 1 - x);
// the outputs are taken inverted, which turns that into the value itself:
//   r = V(d) = sum_{i<N-1} d_i 2^i - d_{N-1} 2^(N-1),  range +-(2^N - 1).
// sign_fix toggles the sign bit (used by the sum branch, see sb_plus_one).
//
// Carry chain with repeaters: an inverter sits in front of every stage whose
// index is a positive multiple of REPEATER_SPACING (stages 3 and 6 at N = 8).
// Behind an odd number of inverters the chain carries ~c and the stage uses
// the complementary forms ~c_{i+1} = ~P_i ~G_i | P_i ~c_i,
// r_i = ~P_i ^ ~c_i and ~r_N = ~P_{N-1} ~G_{N-1} | P_{N-1} c_{N-1}, so the
// result is the same for any spacing; REPEATER_SPACING = 0 means no
// repeaters. The repeaters follow the source circuit; a synthesis tool is
// free to restructure the chain.
//
// Interface: d is an N-digit SB number; r is (N+1)-bit two's complement.
// Purely combinational, delay of N carry stages.
module sb2tc_converter
  import sbnr_pkg::*;
#(
  parameter int unsigned N                = N_DEFAULT,
  parameter int unsigned REPEATER_SPACING = 3
) (
  input  sb_digit_t [N-1:0] d,
  input  logic              sign_fix,
  output logic [N:0]        r
);

  logic [N-1:0] g, p;
  logic [N-1:0] pol;    // 1: the chain carries ~c into stage i
  logic [N-1:0] k;      // chain value at the input of stage i (c_i ^ pol_i)
  logic [N-2:0] k_out;  // stage output, before any repeater (the top stage
                        // has none: r_N comes from the sign rule)
  logic [N:0]   r_n;    // adder result before output inversion

  function automatic bit repeater_before(int unsigned i);
    return REPEATER_SPACING != 0 && i != 0 && (i % REPEATER_SPACING) == 0;
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_digit
    localparam bit REP = repeater_before(i);
    assign p[i] = ~d[i].magn;
    assign g[i] = d[i].sign & d[i].magn;     // ~P_i G_i
    if (i == 0) begin : g_first
      assign pol[0] = 1'b0;
      assign k[0]   = 1'b0;                  // c_0 = 0
    end else begin : g_link
      assign pol[i] = pol[i-1] ^ REP;
      assign k[i]   = REP ? ~k_out[i-1] : k_out[i-1];
    end
    // eq. (19) on true polarity, eq. (20) on inverted polarity
    if (i < N - 1) begin : g_carry
      assign k_out[i] = pol[i] ? ((~p[i] & ~g[i]) | (p[i] & k[i]))
                               : (g[i] | (p[i] & k[i]));
    end
    assign r_n[i]   = p[i] ^ k[i] ^ pol[i];  // eq. (21)
  end

  // sign rule, eq. (22) / (23)
  assign r_n[N] = pol[N-1] ? ~((~p[N-1] & ~g[N-1]) | (p[N-1] & ~k[N-1]))
                           : (g[N-1] | (p[N-1] & ~k[N-1]));

  assign r = {~r_n[N] ^ sign_fix, ~r_n[N-1:0]};

endmodule
