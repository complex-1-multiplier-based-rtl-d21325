// output_switch: routes the two branch results to the real and imaginary
// outputs. With swap = 0, A takes the sum branch +-(a+b) and B the difference
// branch +-(a-b); with swap = 1 they are crossed. This is 2(N+1) two-input
// multiplexers. Purely combinational.
module output_switch
  import sbnr_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N:0] r_sum,
  input  logic [N:0] r_dif,
  input  logic       swap,
  output logic [N:0] A,
  output logic [N:0] B
);

  always_comb begin
    A = swap ? r_dif : r_sum;
    B = swap ? r_sum : r_dif;
  end

endmodule
