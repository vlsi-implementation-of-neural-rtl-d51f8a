// decsel1: shift decision for the smaller operand of the adder.
//
// Restores the implicit bit of small_op's fraction, giving a 24-bit mantissa
// (the implicit bit is 0 for a zero or denormal word, which is treated as
// zero), and converts the exponent difference into a 5-bit shift amount.
// A difference above 24 is clamped to 24, which shifts the whole mantissa out;
// the clamp is this design's choice. Purely combinational.
module decsel1 (
  input  logic [7:0]  diff,
  input  logic [31:0] small_op,
  output logic [4:0]  shamt,
  output logic [23:0] mant
);
  always_comb begin
    shamt = (diff > 8'd24) ? 5'd24 : diff[4:0];
    mant  = (small_op[30:23] == 8'h00) ? 24'h0 : {1'b1, small_op[22:0]};
  end
endmodule
