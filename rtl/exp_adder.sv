// exp_adder: exponent of a product.
//
// Adds the two biased 8-bit exponents and removes one bias,
// e = ea + eb - 127, as a signed 10-bit value so that overflow (e >= 255) and
// underflow (e <= 0) remain visible to the packing stage. The width is this
// design's choice. Purely combinational.
module exp_adder
  import fp_pkg::*;
(
  input  logic [7:0]        ea,
  input  logic [7:0]        eb,
  output logic signed [9:0] e
);
  always_comb e = signed'({2'b00, ea}) + signed'({2'b00, eb}) - signed'(10'(EXP_BIAS));
endmodule
