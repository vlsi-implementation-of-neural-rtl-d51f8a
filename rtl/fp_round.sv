// fp_round: rounding step of the floating-point multiplier.
//
// Works on the 28-bit significand of fp_normalize (fraction ends at bit 3).
// If bit 2, the first bit below the fraction, is set, one is added at bit 3
// and bits 2..0 become zero; otherwise the significand passes with bits 2..0
// cleared. This is round-half-up on the magnitude, the rule the multiplier
// design prescribes; it differs from IEEE round-to-nearest-even only on exact
// ties. An addition may carry into bit 27, which the second normalization
// removes. Purely combinational.
module fp_round (
  input  logic [27:0] sig_in,
  output logic [27:0] sig_out
);
  always_comb begin
    if (sig_in[2]) sig_out = {sig_in[27:3] + 25'd1, 3'b000};
    else           sig_out = {sig_in[27:3], 3'b000};
  end
endmodule
