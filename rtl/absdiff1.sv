// absdiff1: larger exponent and absolute exponent difference.
//
// Compares the two 8-bit biased exponents, outputs the larger one and
// |exp_a - exp_b|, the number of places the smaller operand's mantissa must
// move right for alignment. Purely combinational.
module absdiff1 (
  input  logic [7:0] exp_a,
  input  logic [7:0] exp_b,
  output logic [7:0] big_exp,
  output logic [7:0] diff
);
  always_comb begin
    if (exp_a > exp_b) begin
      big_exp = exp_a;
      diff    = exp_a - exp_b;
    end else begin
      big_exp = exp_b;
      diff    = exp_b - exp_a;
    end
  end
endmodule
