// tb_cmul_pm1_sbnr: end-to-end, exhaustive test of the complex +-1
// multiplier at its default width (N = 8, no parameter override).
//
// Every (a, b) pair is applied with each of the four PN chip pairs, and A, B
// are compared with the real and imaginary parts of (a + jb)(PN_re + jPN_im)
// computed with integers, taken modulo 2^(N+1). The single product that
// does not fit in N+1 bits, -(a+b) = +2^N for a = b = -2^(N-1), is checked
// to wrap to -2^N and counted apart.
//
// It also counts how often each mechanism of the datapath is exercised and
// fails if one never is: each of the four output functions on each branch,
// straight and crossed switching, a negated zero digit ("minus zero")
// reaching a converter, and the sum-branch sign correction.
module tb_cmul_pm1_sbnr;
  import sbnr_pkg::*;
  localparam int N = N_DEFAULT;

  logic [N-1:0] a, b;
  logic pn_re, pn_im;
  logic [N:0] A, B;
  int checks = 0, failures = 0;
  int n_pn[4];
  int n_swap = 0, n_straight = 0, n_minus_zero = 0, n_sign_fix = 0, n_wrap = 0;

  cmul_pm1_sbnr dut (.a(a), .b(b), .pn_re(pn_re), .pn_im(pn_im), .A(A), .B(B));

  function automatic logic [N:0] wrap(int v);
    return v[N:0];
  endfunction

  task automatic report();
    $display("PN(+1,+1)=%0d PN(+1,-1)=%0d PN(-1,+1)=%0d PN(-1,-1)=%0d", n_pn[0], n_pn[1], n_pn[2], n_pn[3]);
    $display("straight=%0d crossed=%0d minus_zero_digits=%0d sign_fix=%0d wrapped=%0d",
             n_straight, n_swap, n_minus_zero, n_sign_fix, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) n_pn[i] = 0;
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        for (int k = 0; k < 4; k++) begin
          int sa, sb, p, q, re, im;
          a = ia[N-1:0];
          b = ib[N-1:0];
          pn_re = k[0];
          pn_im = k[1];
          #1;
          sa = $signed(a);
          sb = $signed(b);
          p = pn_re ? -1 : 1;
          q = pn_im ? -1 : 1;
          re = sa * p - sb * q;
          im = sa * q + sb * p;
          if (re == (1 << N) || im == (1 << N)) n_wrap++;
          checks++;
          if (A !== wrap(re) || B !== wrap(im)) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d pn=(%0d,%0d) A=%0d B=%0d want %0d %0d",
                       sa, sb, p, q, $signed(A), $signed(B), re, im);
          end
          n_pn[k]++;
          if (dut.ctl.swap) n_swap++; else n_straight++;
          for (int i = 0; i < N; i++)
            if (dut.w_sum[i] == 2'b10 || dut.w_dif[i] == 2'b10) begin
              n_minus_zero++;
              break;
            end
          if (dut.sign_fix) n_sign_fix++;
        end
      end
    end
    checks++;
    if (n_pn[0] == 0 || n_pn[1] == 0 || n_pn[2] == 0 || n_pn[3] == 0 || n_swap == 0 ||
        n_straight == 0 || n_minus_zero == 0 || n_sign_fix == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    report();
    $finish;
  end
endmodule
