// tb_sb_plus_one: exhaustive check of the carry-free "+1" stage at N = 8
// over all 3^8 valid signed-binary inputs. Checks, against integer
// arithmetic:
//   * every output digit is a legal sign-magnitude pair,
//   * T(d) + 2^N d_top = T(x) + 1 (all weights positive),
//   * sign_fix is 1 exactly when V(d) differs from V(x) + 1 (V weights the
//     top digit negatively), and that difference is then +-2^N,
//   * each digit d_i depends only on x_i and x_{i-1}: changing a digit
//     two or more positions below leaves d_i unchanged.
module tb_sb_plus_one;
  import sbnr_pkg::*;
  localparam int N = 8;

  sb_digit_t [N-1:0] x, d;
  logic d_top, sign_fix;
  int checks = 0, failures = 0;

  sb_plus_one #(.N(N)) dut (.x(x), .d(d), .d_top(d_top), .sign_fix(sign_fix));

  function automatic sb_digit_t enc(int v);
    case (v)
      1:       return 2'b01;
      -1:      return 2'b11;
      default: return 2'b00;
    endcase
  endfunction

  function automatic int tpos(sb_digit_t [N-1:0] x);
    int v = 0;
    for (int i = 0; i < N; i++) v += digit_value(x[i]) * (1 << i);
    return v;
  endfunction

  function automatic int vtop(sb_digit_t [N-1:0] x);
    return tpos(x) - 2 * digit_value(x[N-1]) * (1 << (N - 1));
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 1;
    for (int i = 0; i < N; i++) total *= 3;
    for (int k = 0; k < total; k++) begin
      int r, diff;
      bit ok;
      sb_digit_t [N-1:0] d0;
      r = k;
      ok = 1;
      for (int i = 0; i < N; i++) begin
        x[i] = enc((r % 3) - 1);
        r /= 3;
      end
      #1;
      for (int i = 0; i < N; i++) if (d[i] == 2'b10) ok = 0;
      if (tpos(d) + int'(d_top) * (1 << N) != tpos(x) + 1) ok = 0;
      diff = vtop(x) + 1 - vtop(d);
      if (sign_fix != (diff != 0)) ok = 0;
      if (diff != 0 && diff != (1 << N) && diff != -(1 << N)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b d=%b d_top=%b fix=%b", x, d, d_top, sign_fix);
      end
      // locality: perturb digit j, digits i >= j + 2 must not move
      d0 = d;
      if (k % 97 == 0) begin
        for (int j = 0; j < N - 2; j++) begin
          sb_digit_t keep;
          keep = x[j];
          x[j] = enc(digit_value(keep) == 1 ? -1 : digit_value(keep) + 1);
          #1;
          checks++;
          for (int i = j + 2; i < N; i++)
            if (d[i] != d0[i]) begin
              failures++;
              $display("FAIL locality j=%0d i=%0d", j, i);
              break;
            end
          x[j] = keep;
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
