// bsfnn1: feed-forward neural network, 2 inputs - N hidden - 1 output, in
// IEEE-754 single precision with bit-serial multipliers.
//
//   stage 1: fsf1 forms in1 * FW11[i], fsf2 forms in2 * FW22[i] (i = 0..N-1),
//            fsfas1 adds them pairwise into the hidden values h[i]
//   stage 2: fsf3 forms h[i] * FW33[i], fsfas2 sums the N products
//   output : Q is registered when lc3 is high
// There is no activation function and no bias term between the stages; the
// network computes Q = sum_i FW33[i] * (FW11[i]*in1 + FW22[i]*in2) with the
// rounding of each operation.
//
// Control (from fsm_bsfnn2): lc1 captures in1/in2 into stage 1, then clk1
// steps it for 24 cycles with sel1 = 0..23; lc2 captures the hidden values
// into stage 2, then clk2 steps it 24 cycles with sel2 = 0..23; lc3 loads Q.
// clk1/clk2 are clock enables of the single clock clk. Q holds between
// loads and is 0 after reset (synchronous).
//
// The default weights are this design's own, not trained values: FW11 and
// FW22 are arbitrary values of either sign in +-[0.1, 1.5], and FW33 is chosen
// so that the whole network computes approximately 0.5835*in1 - 0.1836*in2,
// which maps the mean petal length/width of the three iris species to
// roughly 1, 2 and 3.
module bsfnn1 #(
  parameter int unsigned N = 15,
  parameter logic [31:0] FW11 [N] = '{
      32'h3fa7f0e7, 32'h3f3b8965, 32'hbeb79085, 32'h3f7b5997, 32'hbe6d55dc,
      32'h3e98d6b8, 32'hbf6f0123, 32'h3fb9af42, 32'hbf78ede2, 32'hbe3bc5c0,
      32'hbfaa6b05, 32'hbf983cae, 32'h3f377c82, 32'hbf53a772, 32'h3f4cb7fd},
  parameter logic [31:0] FW22 [N] = '{
      32'hbf3d81cd, 32'h3f2b63b6, 32'hbf8ba3b5, 32'h3f94a1bf, 32'h3e110d66,
      32'hbf291a71, 32'h3f24205f, 32'hbfa4a34e, 32'hbecc3cee, 32'hbf420b1f,
      32'h3f300da1, 32'hbf984f24, 32'h3f1257a7, 32'h3f10cc77, 32'h3f94a40f},
  parameter logic [31:0] FW33 [N] = '{
      32'h3d9a7ab8, 32'h3cb681b4, 32'h3b49d33c, 32'h3ccd0167, 32'hbc5d940f,
      32'h3cd671de, 32'hbd646db2, 32'h3dbc59b4, 32'hbd1de046, 32'h3babadee,
      32'hbd9a605f, 32'hbd0c6d63, 32'h3cbf140a, 32'hbd4a20db, 32'h3c86a1a9}
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clk1,
  input  logic        clk2,
  input  logic        lc1,
  input  logic        lc2,
  input  logic        lc3,
  input  logic [4:0]  sel1,
  input  logic [4:0]  sel2,
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  output logic [31:0] Q
);
  logic [31:0] in1_v [N], in2_v [N];
  logic [31:0] p1 [N], p2 [N], h [N], p3 [N];
  logic [31:0] sum;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in1_v[i] = in1;
      in2_v[i] = in2;
    end
  end

  fsf #(.N(N), .W(FW11)) u_fsf1 (.clk, .rst, .load(lc1), .step(clk1), .sel(sel1), .a(in1_v), .r(p1));
  fsf #(.N(N), .W(FW22)) u_fsf2 (.clk, .rst, .load(lc1), .step(clk1), .sel(sel1), .a(in2_v), .r(p2));
  fsfas1 #(.N(N))        u_fsfas1 (.a(p1), .b(p2), .r(h));
  fsf #(.N(N), .W(FW33)) u_fsf3 (.clk, .rst, .load(lc2), .step(clk2), .sel(sel2), .a(h), .r(p3));
  fsfas2 #(.N(N))        u_fsfas2 (.r(p3), .q(sum));

  always_ff @(posedge clk) begin
    if (rst)      Q <= '0;
    else if (lc3) Q <= sum;
  end

  // The controller drives at most one phase at a time.
  assert property (@(posedge clk) disable iff (rst)
                   (int'(lc1) + int'(clk1) + int'(lc2) + int'(clk2) + int'(lc3)) <= 1)
    else $error("bsfnn1: overlapping control phases");
endmodule
