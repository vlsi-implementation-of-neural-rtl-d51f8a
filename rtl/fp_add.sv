// fp_add: IEEE-754 single precision adder/subtractor.
//
// Because the format is sign/magnitude, one datapath adds or subtracts
// depending on the operand signs. The four steps are done by separate blocks:
//   bigfp_fps       orders the operands by magnitude (big_op, small_op)
//   absdiff1        larger exponent and exponent difference
//   decsel1         shift amount and 24-bit mantissa (implicit bit) of small_op
//   barrel_shift_r  aligns small_op's mantissa to big_op's exponent
//   intadd23        adds or subtracts the mantissas (25-bit result)
//   readj_m1        finds the leading one and renormalizes the mantissa
//   expadder1       corrects the exponent by the renormalization amount
// The result takes big_op's sign. Bits shifted out during alignment are
// dropped and the sum is not rounded, as the adder's block structure has no
// rounding stage: results can be one unit in the last place below the exact
// sum, never above it in magnitude for an addition.
//
// Special values (this design's choice, the adder's description has none):
// zero and denormal inputs count as zero; a NaN input, or infinities of
// opposite sign, give the quiet NaN 0x7FC00000; another infinite input is
// passed on. A zero or underflowing sum gives +0, an overflowing sum gives
// infinity. Purely combinational; there is no clock.
module fp_add
  import fp_pkg::*;
(
  input  logic [31:0] fp_a,
  input  logic [31:0] fp_b,
  output logic [31:0] sum
);
  logic [31:0] big_op, small_op;
  logic [7:0]  big_exp, diff, onethloc, rexp1;
  logic [4:0]  shamt;
  logic [23:0] small_mant, small_al, big_mant;
  logic [24:0] man1;
  logic [22:0] mant;
  logic        addsub, adj_sub, is_zero, underflow, overflow;
  logic        a_nan, b_nan, a_inf, b_inf;

  bigfp_fps      u_order (.fp_a, .fp_b, .big_op, .small_op);
  absdiff1       u_diff  (.exp_a(fp_a[30:23]), .exp_b(fp_b[30:23]), .big_exp, .diff);
  decsel1        u_dsel  (.diff, .small_op, .shamt, .mant(small_mant));
  barrel_shift_r #(.W(24)) u_shift (.din(small_mant), .shamt, .dout(small_al));

  always_comb begin
    big_mant = (big_op[30:23] == 8'h00) ? 24'h0 : {1'b1, big_op[22:0]};
    addsub   = fp_a[31] ^ fp_b[31];
  end

  intadd23       u_add   (.man_a(big_mant), .man_b(small_al), .addsub, .r(man1));
  readj_m1       u_readj (.man1, .onethloc, .mant, .addsub(adj_sub), .is_zero);
  expadder1      u_exp   (.exp1(big_exp), .val(onethloc), .addsub(adj_sub), .rexp1, .underflow, .overflow);

  always_comb begin
    a_nan = (fp_a[30:23] == 8'hFF) && (fp_a[22:0] != '0);
    b_nan = (fp_b[30:23] == 8'hFF) && (fp_b[22:0] != '0);
    a_inf = (fp_a[30:23] == 8'hFF) && (fp_a[22:0] == '0);
    b_inf = (fp_b[30:23] == 8'hFF) && (fp_b[22:0] == '0);
    if (a_nan || b_nan || (a_inf && b_inf && addsub)) sum = FP_QNAN;
    else if (a_inf)                                   sum = fp_a;
    else if (b_inf)                                   sum = fp_b;
    else if (is_zero || underflow)                    sum = 32'h0;
    else if (overflow)                                sum = {big_op[31], 8'hFF, 23'h0};
    else                                              sum = {big_op[31], rexp1, mant};
  end
endmodule
