// fsf: bank of N bit-serial floating-point multipliers with built-in weights.
//
// Multiplier i computes r[i] = a[i] * W[i] in IEEE-754 single precision
// (fp_mul_bs). The weights W are the parallel operands and are fixed per
// build by the parameter; the data words a[i] are the serial operands. In the
// network's first stage every a[i] is the same input word, so the bank forms
// the N products of one input with the N input-to-hidden weights; in the
// second stage a[i] are the N hidden values.
//
// Timing: load captures a (and clears the serial cores), then step for 24
// cycles with sel = 0..23 (supplied by the controller); r is valid from the
// cycle after the last step until the next load. The default weights are
// all 1.0; the network passes its trained weights.
module fsf #(
  parameter int unsigned N = 15,
  parameter logic [31:0] W [N] = '{default: 32'h3F80_0000}
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic        step,
  input  logic [4:0]  sel,
  input  logic [31:0] a [N],
  output logic [31:0] r [N]
);
  for (genvar i = 0; i < N; i++) begin : g_mul
    fp_mul_bs u_mul (
      .clk, .rst, .load, .step, .sel,
      .a(a[i]), .b(W[i]), .z(r[i])
    );
  end
endmodule
