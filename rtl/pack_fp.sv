// pack_fp: packs sign, exponent and significand into an IEEE-754 word.
//
// Takes the normalized, rounded 28-bit significand (leading one at bit 26,
// fraction at bits 25..3) and the signed biased exponent. An exponent of 255
// or more packs as infinity; an exponent of 0 or less, or a zero significand,
// packs as zero (underflow is flushed, no denormals are produced). The class
// flags from the multiplier's logic block override everything: NaN gives the
// quiet NaN 0x7FC00000, infinity and zero keep the product's sign. Purely
// combinational.
module pack_fp
  import fp_pkg::*;
(
  input  logic              sign,
  input  logic signed [9:0] exp,
  input  logic [27:0]       sig,
  input  logic              is_nan,
  input  logic              is_inf,
  input  logic              is_z,
  output logic [31:0]       fp
);
  always_comb begin
    if (is_nan)                         fp = FP_QNAN;
    else if (is_inf || exp >= 10'sd255) fp = {sign, 8'hFF, 23'h0};
    else if (is_z || exp <= 10'sd0 || sig[26] == 1'b0)
                                        fp = {sign, 31'h0};
    else                                fp = {sign, exp[7:0], sig[25:3]};
  end
endmodule
