// fp_mul_bs: IEEE-754 single precision multiplier around a bit-serial
// significand multiplier.
//
// load captures both operands and clears the serial core. The data path then
// follows the generalized single-precision multiplier: both words are
// unpacked (unpack_fp), a logic block classifies the result (fp_mul_logic),
// the exponents are added (exp_adder) while bs_mul24 multiplies the two
// 24-bit significands, and the 48-bit product is normalized (fp_normalize),
// rounded (fp_round), normalized again and packed (pack_fp).
//
// Operand a is the serial one: in each step cycle the controller puts the
// index of the significand bit to use on sel (0 first, 23 last), and that bit
// of the captured a is fed to the core. b is the parallel operand.
//
// Timing: one load cycle, then 24 step cycles with sel = 0..23; z is valid
// from the cycle after the last step and holds until the next load. The
// post-processing after the core is combinational. Reset is synchronous.
// The split of work between operands and the latency are this design's
// choices.
module fp_mul_bs
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic        step,
  input  logic [4:0]  sel,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] z
);
  logic [31:0] a_q, b_q;
  unpacked_t   ua, ub;
  logic        nan_o, inf_o, z_o;
  logic signed [9:0] e_sum, e_n1, e_n2;
  logic [47:0] prod;
  logic [27:0] sig_n1, sig_r, sig_n2;
  logic [23:0] a_sig;
  logic        a_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a;
      b_q <= b;
    end
  end

  unpack_fp    u_unpack0 (.fp(a_q), .u(ua));
  unpack_fp    u_unpack1 (.fp(b_q), .u(ub));
  fp_mul_logic u_logic   (.ua, .ub, .is_nan(nan_o), .is_inf(inf_o), .is_z(z_o));
  exp_adder    u_expadd  (.ea(ua.exp), .eb(ub.exp), .e(e_sum));

  always_comb begin
    a_sig = ua.sig[31:8];
    a_bit = (sel < 5'd24) ? a_sig[sel] : 1'b0;
  end

  bs_mul24 #(.W(24)) u_core (
    .clk, .rst, .clr(load), .step, .a_bit, .b(ub.sig[31:8]), .p(prod)
  );

  fp_normalize #(.IN_W(48)) u_norm1 (.sig_in(prod),  .exp_in(e_sum), .sig_out(sig_n1), .exp_out(e_n1));
  fp_round                  u_round (.sig_in(sig_n1), .sig_out(sig_r));
  fp_normalize #(.IN_W(28)) u_norm2 (.sig_in(sig_r), .exp_in(e_n1),  .sig_out(sig_n2), .exp_out(e_n2));
  pack_fp u_pack (.sign(ua.sign ^ ub.sign), .exp(e_n2), .sig(sig_n2),
                  .is_nan(nan_o), .is_inf(inf_o), .is_z(z_o), .fp(z));

  // The serial core is defined for bit indexes 0..23 only.
  assert property (@(posedge clk) disable iff (rst) step |-> sel < 5'd24)
    else $error("fp_mul_bs: sel out of range during a step");
endmodule
