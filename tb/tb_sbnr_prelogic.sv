// tb_sbnr_prelogic: exhaustive check of the prelogic stage at N = 8.
// For every pair (a, b) it checks each digit against x_i = 1 - (a_i + b_i)
// and x_i = 1 - (a_i + ~b_i), and the whole-number identities
// a + b = -(V(x_sum) + 1) and a - b = -V(x_dif), where V weights the top
// digit by -2^(N-1). References are plain integer arithmetic.
module tb_sbnr_prelogic;
  import sbnr_pkg::*;
  localparam int N = 8;

  logic [N-1:0]      a, b;
  sb_digit_t [N-1:0] x_sum, x_dif;
  int checks = 0, failures = 0;

  sbnr_prelogic #(.N(N)) dut (.a(a), .b(b), .x_sum(x_sum), .x_dif(x_dif));

  function automatic int vtop(sb_digit_t [N-1:0] x);
    int v = 0;
    for (int i = 0; i < N - 1; i++) v += digit_value(x[i]) * (1 << i);
    v -= digit_value(x[N-1]) * (1 << (N - 1));
    return v;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        int sa, sb;
        bit ok;
        ok = 1;
        a = ia[N-1:0];
        b = ib[N-1:0];
        #1;
        sa = $signed(a);
        sb = $signed(b);
        for (int i = 0; i < N; i++) begin
          if (digit_value(x_sum[i]) != 1 - (int'(a[i]) + int'(b[i]))) ok = 0;
          if (digit_value(x_dif[i]) != 1 - (int'(a[i]) + int'(!b[i]))) ok = 0;
          if (x_sum[i] == 2'b10 || x_dif[i] == 2'b10) ok = 0;
        end
        if (-(vtop(x_sum) + 1) != sa + sb) ok = 0;
        if (-vtop(x_dif) != sa - sb) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d", sa, sb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
