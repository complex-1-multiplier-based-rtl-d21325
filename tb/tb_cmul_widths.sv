// tb_cmul_widths: the multiplier at the operand widths of interest for a
// CDMA receiver, 8 to 16 bits. Instances at N = 8, 12 and 16 are driven with
// random operands and PN chips, plus the extreme operands -2^(N-1),
// 2^(N-1)-1 and 0, and compared with the integer complex product modulo
// 2^(N+1).
module tb_cmul_widths;
  localparam int NR = 20000;

  logic [15:0] a, b;
  logic pn_re, pn_im;
  logic [8:0]  A8, B8;
  logic [12:0] A12, B12;
  logic [16:0] A16, B16;
  int checks = 0, failures = 0;

  cmul_pm1_sbnr #(.N(8))  u8  (.a(a[7:0]),  .b(b[7:0]),  .pn_re(pn_re), .pn_im(pn_im), .A(A8),  .B(B8));
  cmul_pm1_sbnr #(.N(12)) u12 (.a(a[11:0]), .b(b[11:0]), .pn_re(pn_re), .pn_im(pn_im), .A(A12), .B(B12));
  cmul_pm1_sbnr #(.N(16)) u16 (.a(a),       .b(b),       .pn_re(pn_re), .pn_im(pn_im), .A(A16), .B(B16));

  // integer complex product of the low n bits of a, b, modulo 2^(n+1), sign extended
  function automatic longint ref_part(int n, logic [15:0] x, logic [15:0] y, bit re);
    longint sx, sy, p, q, v;
    sx = longint'(x) & ((longint'(1) << n) - 1);
    sy = longint'(y) & ((longint'(1) << n) - 1);
    if (sx >= (longint'(1) << (n - 1))) sx -= longint'(1) << n;
    if (sy >= (longint'(1) << (n - 1))) sy -= longint'(1) << n;
    p = pn_re ? -1 : 1;
    q = pn_im ? -1 : 1;
    v = re ? sx * p - sy * q : sx * q + sy * p;
    v = v & ((longint'(1) << (n + 1)) - 1);
    return v;
  endfunction

  task automatic check(int n, longint got_a, longint got_b);
    checks++;
    if (got_a != ref_part(n, a, b, 1) || got_b != ref_part(n, a, b, 0)) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d a=%h b=%h pn=%b%b", n, a, b, pn_re, pn_im);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner[3];
    for (int k = 0; k < NR + 36; k++) begin
      if (k < 36) begin
        // corners per width are applied through the low bits of a and b
        corner[0] = 16'h8000; corner[1] = 16'h7fff; corner[2] = 16'h0000;
        a = corner[(k / 3) % 3];
        b = corner[k % 3];
        pn_re = k[0] ^ (k >= 18);
        pn_im = (k >= 9 && k < 18) || k >= 27;
      end else begin
        a = 16'($urandom);
        b = 16'($urandom);
        pn_re = $urandom_range(1);
        pn_im = $urandom_range(1);
      end
      #1;
      check(16, longint'(A16), longint'(B16));
      check(12, longint'(A12), longint'(B12));
      check(8,  longint'(A8),  longint'(B8));
    end
    // the 8- and 12-bit corners need their own sign bits set
    for (int k = 0; k < 9; k++) begin
      for (int m = 0; m < 4; m++) begin
        a = (k / 3 == 0) ? 16'hff80 : (k / 3 == 1) ? 16'h007f : 16'h0000;
        b = (k % 3 == 0) ? 16'hff80 : (k % 3 == 1) ? 16'h007f : 16'h0000;
        pn_re = m[0];
        pn_im = m[1];
        #1;
        check(8, longint'(A8), longint'(B8));
        a = (k / 3 == 0) ? 16'hf800 : (k / 3 == 1) ? 16'h07ff : 16'h0000;
        b = (k % 3 == 0) ? 16'hf800 : (k % 3 == 1) ? 16'h07ff : 16'h0000;
        #1;
        check(12, longint'(A12), longint'(B12));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
