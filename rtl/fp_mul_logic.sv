// fp_mul_logic: predicts the class of a product from the classes of its
// operands, ahead of the arithmetic.
//
// NaN in either operand, or infinity times zero, gives NaN; otherwise an
// infinite operand gives infinity; otherwise a zero operand gives zero. The
// packing stage lets these flags override the computed result. The rules are
// those of the IEEE-754 classes the floating-point multiplier checks; the
// priority order is this design's. Purely combinational.
module fp_mul_logic
  import fp_pkg::*;
(
  input  unpacked_t ua,
  input  unpacked_t ub,
  output logic      is_nan,
  output logic      is_inf,
  output logic      is_z
);
  always_comb begin
    is_nan = ua.is_nan || ub.is_nan || (ua.is_inf && ub.is_z) || (ua.is_z && ub.is_inf);
    is_inf = !is_nan && (ua.is_inf || ub.is_inf);
    is_z   = !is_nan && !is_inf && (ua.is_z || ub.is_z);
  end
endmodule
