// tb_pn_logic: checks the PN decoder against the complex product.
// For each of the four chip pairs and random a, b, the controls are used to
// pick +-(a+b) / +-(a-b) for A and B (the sum branch natively gives -(a+b),
// the difference branch -(a-b)); the picks must equal the real and imaginary
// parts of (a + jb)(PN_re + jPN_im) computed with integers.
module tb_pn_logic;
  import sbnr_pkg::*;

  logic pn_re, pn_im;
  pn_ctl_t ctl;
  int checks = 0, failures = 0;

  pn_logic dut (.pn_re(pn_re), .pn_im(pn_im), .ctl(ctl));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      int a, b, p, q, s, m, got_a, got_b;
      a = int'($urandom_range(255)) - 128;
      b = int'($urandom_range(255)) - 128;
      pn_re = k[0];
      pn_im = k[1];
      #1;
      p = pn_re ? -1 : 1;
      q = pn_im ? -1 : 1;
      s = ctl.inv_sum ? (a + b) : -(a + b);
      m = ctl.inv_dif ? (a - b) : -(a - b);
      got_a = ctl.swap ? m : s;
      got_b = ctl.swap ? s : m;
      checks++;
      if (got_a != a * p - b * q || got_b != a * q + b * p) begin
        failures++;
        if (failures < 10) $display("FAIL pn=%b%b ctl=%b", pn_re, pn_im, ctl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
