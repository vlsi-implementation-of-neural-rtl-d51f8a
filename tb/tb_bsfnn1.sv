// tb_bsfnn1: self-checking testbench of the network datapath. The testbench
// plays the controller: lc1, 24 cycles of clk1 with sel1 = 0..23, lc2, 24
// cycles of clk2 with sel2 = 0..23, lc3. It uses its own weight set (passed
// as parameters) and random inputs of either sign, and compares Q with
// fp_ref_pkg::ref_net. It also checks that Q changes only on lc3 and that
// Q is available in the cycle after lc3, i.e. 51 cycles after lc1.
module tb_bsfnn1;
  import fp_ref_pkg::*;
  localparam wvec_t W11 = '{
    32'h3F80_0000, 32'hBF00_0000, 32'h3E80_0000, 32'h4000_0000, 32'hBFC0_0000,
    32'h3F40_0000, 32'hBE00_0000, 32'h3FA0_0000, 32'h3DCC_CCCD, 32'hBF4C_CCCD,
    32'h3F19_999A, 32'hC020_0000, 32'h3EAA_AAAB, 32'h3F2A_AAAB, 32'hBF80_0001};
  localparam wvec_t W22 = '{
    32'hBF80_0000, 32'h3F00_0000, 32'h3F60_0000, 32'hBE80_0000, 32'h3FC0_0000,
    32'hBF40_0000, 32'h4000_0000, 32'hBFA0_0000, 32'h3E4C_CCCD, 32'h3F4C_CCCD,
    32'hBF19_999A, 32'h3F20_0000, 32'h3EAA_AAAB, 32'hBF2A_AAAB, 32'h3F80_0000};
  localparam wvec_t W33 = '{
    32'h3E00_0000, 32'hBD80_0000, 32'h3D4C_CCCD, 32'hBE4C_CCCD, 32'h3C23_D70A,
    32'h3E80_0000, 32'hBE80_0000, 32'h3D00_0000, 32'h3F00_0000, 32'hBC80_0000,
    32'h3DA0_0000, 32'hBDA0_0000, 32'h3E19_999A, 32'h3B80_0000, 32'hBE00_0000};

  logic clk = 1'b0, rst = 1'b1;
  logic clk1 = 0, clk2 = 0, lc1 = 0, lc2 = 0, lc3 = 0;
  logic [4:0] sel1 = '0, sel2 = '0;
  logic [31:0] in1, in2, Q, q_prev, e;
  int checks = 0, failures = 0;

  bsfnn1 #(.N(15), .FW11(W11), .FW22(W22), .FW33(W33)) dut (
    .clk, .rst, .clk1, .clk2, .lc1, .lc2, .lc3, .sel1, .sel2, .in1, .in2, .Q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Q may change only in the cycle after lc3
  always @(posedge clk) begin
    q_prev <= Q;
  end

  task automatic one_sample(input logic [31:0] x1, input logic [31:0] x2);
    in1 <= x1; in2 <= x2;
    lc1 <= 1'b1;
    @(posedge clk);
    lc1 <= 1'b0;
    for (int k = 0; k < 24; k++) begin
      clk1 <= 1'b1; sel1 <= 5'(k);
      @(posedge clk);
      #1;
      checks++;
      if (Q !== q_prev) begin failures++; $display("FAIL Q changed without lc3"); end
    end
    clk1 <= 1'b0; sel1 <= '0;
    in1 <= $urandom; in2 <= $urandom;   // inputs are only needed at lc1
    lc2 <= 1'b1;
    @(posedge clk);
    lc2 <= 1'b0;
    for (int k = 0; k < 24; k++) begin
      clk2 <= 1'b1; sel2 <= 5'(k);
      @(posedge clk);
    end
    clk2 <= 1'b0; sel2 <= '0;
    lc3 <= 1'b1;
    @(posedge clk);
    lc3 <= 1'b0;
    #1;
    e = ref_net(x1, x2, W11, W22, W33);
    checks++;
    if (Q !== e) begin
      failures++;
      $display("FAIL in %h %h: Q=%h expected %h", x1, x2, Q, e);
    end
  endtask

  initial begin
    in1 = '0; in2 = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (Q !== 32'h0) begin failures++; $display("FAIL Q not zero after reset"); end
    one_sample(32'h3F80_0000, 32'h3F80_0000);
    one_sample(32'h0000_0000, 32'h4000_0000);
    for (int t = 0; t < 150; t++) one_sample(rand_fp(120, 130), rand_fp(120, 130));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
