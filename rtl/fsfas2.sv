// fsfas2: sums N floating-point values into one.
//
// The output neuron's sum is formed by a chain of N-1 fp_add blocks,
// q = (((r[0] + r[1]) + r[2]) + ...) + r[N-1]. Floating-point addition is not
// associative, so this order is part of the function; the chain order is this
// design's choice. Purely combinational.
module fsfas2 #(
  parameter int unsigned N = 15
) (
  input  logic [31:0] r [N],
  output logic [31:0] q
);
  logic [31:0] part [N];

  assign part[0] = r[0];
  for (genvar i = 1; i < N; i++) begin : g_chain
    fp_add u_add (.fp_a(part[i-1]), .fp_b(r[i]), .sum(part[i]));
  end
  assign q = part[N-1];
endmodule
