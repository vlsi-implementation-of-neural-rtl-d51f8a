// fp_normalize: normalization step of the floating-point multiplier.
//
// The input significand carries its leading one in one of its two top bits
// (a product of two normalized significands lies in [1,4); a rounded
// significand may have carried into its top bit). The output is the 28-bit
// rounding format: bit 27 zero, the leading one at bit 26, fraction in bits
// 25..3 and three bits below it, the lowest being a sticky OR of everything
// that did not fit. When the top input bit is set the significand moves one
// place right and the exponent goes up by one. The same block serves both
// normalization steps of the multiplier (IN_W = 48 after the significand
// product, IN_W = 28 after rounding). Purely combinational.
module fp_normalize #(
  parameter int unsigned IN_W = 48
) (
  input  logic [IN_W-1:0]   sig_in,
  input  logic signed [9:0] exp_in,
  output logic [27:0]       sig_out,
  output logic signed [9:0] exp_out
);
  always_comb begin
    sig_out[27] = 1'b0;
    if (sig_in[IN_W-1]) begin
      sig_out[26:1] = sig_in[IN_W-1 -: 26];
      sig_out[0]    = |sig_in[IN_W-27:0];
      exp_out       = exp_in + 10'sd1;
    end else begin
      sig_out[26:1] = sig_in[IN_W-2 -: 26];
      sig_out[0]    = |sig_in[IN_W-28:0];
      exp_out       = exp_in;
    end
  end

  initial assert (IN_W >= 28) else $error("fp_normalize: IN_W must be at least 28");
endmodule
