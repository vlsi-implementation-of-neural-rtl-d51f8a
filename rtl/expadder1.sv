// expadder1: result exponent of the floating-point adder.
//
// Corrects the larger operand's exponent exp1 by the renormalization amount
// val from readj_m1: exp1 + val when addsub = 0, exp1 - val when addsub = 1,
// computed in 9 bits. A result of 0 or below is flagged as underflow (the
// adder then returns zero) and one of 255 or more as overflow (infinity).
// Purely combinational.
module expadder1 (
  input  logic [7:0] exp1,
  input  logic [7:0] val,
  input  logic       addsub,
  output logic [7:0] rexp1,
  output logic       underflow,
  output logic       overflow
);
  logic signed [9:0] q;
  always_comb begin
    q         = addsub ? (signed'({2'b00, exp1}) - signed'({2'b00, val}))
                       : (signed'({2'b00, exp1}) + signed'({2'b00, val}));
    rexp1     = q[7:0];
    underflow = (q <= 10'sd0);
    overflow  = (q >= 10'sd255);
  end
endmodule
