// tb_output_switch: random check of the 2x2 output switch at N = 8:
// straight when swap = 0, crossed when swap = 1.
module tb_output_switch;
  localparam int N = 8;

  logic [N:0] r_sum, r_dif, A, B;
  logic swap;
  int checks = 0, failures = 0;

  output_switch #(.N(N)) dut (.r_sum(r_sum), .r_dif(r_dif), .swap(swap), .A(A), .B(B));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      r_sum = (N + 1)'($urandom);
      r_dif = (N + 1)'($urandom);
      swap  = k[0];
      #1;
      checks++;
      if ((swap ? {r_dif, r_sum} : {r_sum, r_dif}) !== {A, B}) begin
        failures++;
        if (failures < 10) $display("FAIL swap=%b A=%h B=%h", swap, A, B);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
