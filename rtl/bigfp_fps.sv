// bigfp_fps: orders the two operands of the floating-point adder.
//
// big_op receives the operand of larger magnitude and small_op the other, so
// that only small_op's mantissa ever has to be shifted for alignment. The
// comparison is on bits 30..0 (exponent then fraction), which orders IEEE-754
// magnitudes; on a tie big_op is fp_a. The adder's design orders by signed
// value instead, which would send the operand with the smaller exponent down
// the unshifted path whenever the signs differ and the positive operand is
// the smaller one; ordering by magnitude is this design's correction.
// Purely combinational.
module bigfp_fps (
  input  logic [31:0] fp_a,
  input  logic [31:0] fp_b,
  output logic [31:0] big_op,
  output logic [31:0] small_op
);
  always_comb begin
    if (fp_a[30:0] >= fp_b[30:0]) begin
      big_op   = fp_a;
      small_op = fp_b;
    end else begin
      big_op   = fp_b;
      small_op = fp_a;
    end
  end
endmodule
