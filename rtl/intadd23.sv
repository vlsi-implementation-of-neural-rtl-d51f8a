// intadd23: mantissa adder/subtractor of the floating-point adder.
//
// Adds (addsub = 0) or subtracts (addsub = 1) the aligned 24-bit mantissas,
// each carrying its implicit bit, giving a 25-bit result whose top bit is the
// carry of an addition. Subtraction is done as addition of the two's
// complement of man_b. Since man_a belongs to the operand of larger magnitude
// the difference is never negative, so no complement of the result is
// needed. Purely combinational.
module intadd23 (
  input  logic [23:0] man_a,
  input  logic [23:0] man_b,
  input  logic        addsub,
  output logic [24:0] r
);
  logic [24:0] tb;
  always_comb begin
    tb = addsub ? (~{1'b0, man_b} + 25'd1) : {1'b0, man_b};
    r  = {1'b0, man_a} + tb;
  end
endmodule
