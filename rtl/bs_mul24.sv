// bs_mul24: bit-serial (serial-parallel, carry-save) significand multiplier.
//
// One operand, b, is held in parallel; the other arrives one bit per step,
// least significant bit first, on a_bit. Every bit position i is one cell
// with a single AND gate (the partial-product bit b[i] & a_bit) and a single
// full adder, whose sum and carry are held in registers s[i] and c[i]. In a
// step cell i adds its partial-product bit, the sum of cell i+1 from the
// previous step (the carry-save word shifting right by one place) and its own
// previous carry. Cell 0's new sum is a finished product bit; it is shifted
// into lo from the top, so after W steps lo holds product bits W-1..0. The
// upper half is still in carry-save form and is resolved by one W-bit adder,
// hi = (s >> 1) + c. So the multiplier needs W AND gates and W full adders,
// the cost of the bit-serial multiplier, plus the final adder.
//
// Timing: assert clr for one cycle (clears s, c and lo), then step for
// exactly W cycles with the serial bits in order; p is valid from the cycle
// after the last step until the next clr. Extra steps with a_bit = 0 would
// shift the product further right, so the controller must stop at W.
// The carry-save cell arrangement and the collection of the low half are
// this design's reading of the bit-serial type-III multiplier; the width of
// 24 (the significand with its hidden bit) follows the design.
module bs_mul24 #(
  parameter int unsigned W = 24
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           clr,
  input  logic           step,
  input  logic           a_bit,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  logic [W-1:0] s, c, lo;
  logic [W-1:0] s_nxt, c_nxt, pp, s_up;
  logic [W:0]   hi;

  always_comb begin
    pp    = b & {W{a_bit}};
    s_up  = {1'b0, s[W-1:1]};
    s_nxt = pp ^ s_up ^ c;
    c_nxt = (pp & s_up) | (pp & c) | (s_up & c);
    hi    = {1'b0, s_up} + {1'b0, c};
    p     = {hi[W-1:0], lo};
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      s  <= '0;
      c  <= '0;
      lo <= '0;
    end else if (step) begin
      s  <= s_nxt;
      c  <= c_nxt;
      lo <= {s_nxt[0], lo[W-1:1]};
    end
  end
endmodule
