// tb_sb_cond_inverter: random check of the conditional SB negation at N = 8.
// Inputs include the "minus zero" pair. For each digit the output value must
// equal the input value, negated when inv = 1, and the magnitude bit must be
// unchanged.
module tb_sb_cond_inverter;
  import sbnr_pkg::*;
  localparam int N = 8;

  sb_digit_t [N-1:0] d_in, d_out;
  logic inv;
  int checks = 0, failures = 0;

  sb_cond_inverter #(.N(N)) dut (.d_in(d_in), .inv(inv), .d_out(d_out));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      bit ok;
      ok = 1;
      d_in = (2 * N)'($urandom);
      inv  = k[0];
      #1;
      for (int i = 0; i < N; i++) begin
        int want;
        want = inv ? -digit_value(d_in[i]) : digit_value(d_in[i]);
        if (digit_value(d_out[i]) != want) ok = 0;
        if (d_out[i].magn != d_in[i].magn) ok = 0;
      end
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL d_in=%b inv=%b d_out=%b", d_in, inv, d_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
