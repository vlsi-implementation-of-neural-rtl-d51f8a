// unpack_fp: splits an IEEE-754 single precision word into its fields.
//
// The sign is bit 31, the exponent bits 30..23 and the fraction bits 22..0.
// The significand is widened to 32 bits by placing the hidden bit on top of
// the fraction and appending zeros below, as the unpack stage of the
// floating-point multiplier does. The block also classifies the word:
// exponent 0xFF with a zero fraction is infinity, with a non-zero fraction
// NaN; exponent 0x00 is zero. An exponent of 0x00 with a non-zero fraction (a
// denormal, the underflow case) is flushed to zero: this is this design's
// choice. Purely combinational.
module unpack_fp
  import fp_pkg::*;
(
  input  logic [31:0] fp,
  output unpacked_t   u
);
  float32_t f;
  logic     exp_zero, exp_ones;

  always_comb begin
    f        = float32_t'(fp);
    exp_zero = (f.exp == 8'h00);
    exp_ones = (f.exp == 8'hFF);
    u.sign   = f.sign;
    u.exp    = f.exp;
    u.sig    = exp_zero ? 32'h0 : {1'b1, f.frac, 8'h00};
    u.is_inf = exp_ones && (f.frac == '0);
    u.is_nan = exp_ones && (f.frac != '0);
    u.is_z   = exp_zero;
  end
endmodule
