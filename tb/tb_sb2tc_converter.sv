// tb_sb2tc_converter: exhaustive check of the SB -> two's-complement
// converter at N = 8 over all 4^8 digit patterns, "minus zero" included,
// with sign_fix 0 and 1. Reference: r = V(d) = sum_{i<N-1} d_i 2^i -
// d_{N-1} 2^(N-1) as an (N+1)-bit number, with bit N toggled by sign_fix.
// A second instance with a repeater every 2 stages carries the inverted
// carry into the top stage, so both forms of the sign rule are checked.
module tb_sb2tc_converter;
  import sbnr_pkg::*;
  localparam int N = 8;

  sb_digit_t [N-1:0] d;
  logic sign_fix;
  logic [N:0] r, r_odd;
  int checks = 0, failures = 0;

  sb2tc_converter #(.N(N)) dut (.d(d), .sign_fix(sign_fix), .r(r));
  sb2tc_converter #(.N(N), .REPEATER_SPACING(2)) dut_odd (.d(d), .sign_fix(sign_fix), .r(r_odd));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < (1 << (2 * N)); k++) begin
      for (int f = 0; f < 2; f++) begin
        int v;
        logic [N:0] want;
        v = 0;
        d = k[2*N-1:0];
        sign_fix = f[0];
        #1;
        for (int i = 0; i < N - 1; i++) v += digit_value(d[i]) * (1 << i);
        v -= digit_value(d[N-1]) * (1 << (N - 1));
        want = v[N:0];
        want[N] ^= sign_fix;
        checks++;
        if (r !== want || r_odd !== want) begin
          failures++;
          if (failures < 10) $display("FAIL d=%b fix=%b r=%b r_odd=%b want=%b", d, sign_fix, r, r_odd, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
