// fsfas1: N floating-point adders side by side, r[i] = a[i] + b[i].
//
// In the network this forms the sum of the two weighted inputs of each
// hidden neuron. Each lane is one fp_add; purely combinational.
module fsfas1 #(
  parameter int unsigned N = 15
) (
  input  logic [31:0] a [N],
  input  logic [31:0] b [N],
  output logic [31:0] r [N]
);
  for (genvar i = 0; i < N; i++) begin : g_add
    fp_add u_add (.fp_a(a[i]), .fp_b(b[i]), .sum(r[i]));
  end
endmodule
