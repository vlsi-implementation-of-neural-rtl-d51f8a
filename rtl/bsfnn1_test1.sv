// bsfnn1_test1: top level of the bit-serial floating-point neural network.
//
// framgen1 presents one iris sample (petal length, petal width) at a time;
// bsfnn1 computes the network output for it in IEEE-754 single precision
// using bit-serial multipliers; fsm_bsfnn2 sequences the two multiplier
// stages and the output register; cnt81 counts the outputs. One sample takes
// 51 clock cycles. When Q is updated (on the same clock edge) val increments,
// so after an update val is the 1-based number of the sample Q belongs to.
//
// Interface: clk, rst (synchronous, active high), Q[31:0] network output,
// val[7:0] sample count. All blocks run on the one clock; the controller's
// clk1, clk2 and clk_data are clock enables. N_SAMPLES sets the length of the
// sample table (150 by default, the size of the iris data set).
module bsfnn1_test1 #(
  parameter int unsigned N_SAMPLES = 150
) (
  input  logic        clk,
  input  logic        rst,
  output logic [7:0]  val,
  output logic [31:0] Q
);
  logic       clk1, clk2, clk_data, lc1, lc2, lc3;
  logic [4:0] sel1, sel2;
  logic [31:0] data1, data2;

  fsm_bsfnn2 u_fsm (.clk, .rst, .clk1, .clk2, .clk_data, .lc1, .lc2, .lc3, .sel1, .sel2);
  framgen1 #(.N_SAMPLES(N_SAMPLES)) u_gen (.clk, .rst, .adv(clk_data), .data1, .data2);
  cnt81    u_cnt (.clk, .rst, .inc(clk_data), .val);
  bsfnn1   u_nn  (.clk, .rst, .clk1, .clk2, .lc1, .lc2, .lc3, .sel1, .sel2,
                  .in1(data1), .in2(data2), .Q);
endmodule
