// tb_fsf: self-checking testbench of the multiplier bank. With a set of 15
// weights of mixed sign and magnitude (passed as the bank's parameter) it
// loads random data words (first the same word in every lane, as in the
// network's first stage, then a different word per lane), steps the bank
// through the 24 serial bits and compares every lane with
// fp_ref_pkg::ref_mul. It also checks that lanes stay independent (no lane
// shows another lane's weight) by using pairwise different weights.
module tb_fsf;
  import fp_ref_pkg::*;
  localparam int N = 15;
  localparam logic [31:0] WT [N] = '{
    32'h3F80_0000, 32'hBF80_0000, 32'h4049_0FDB, 32'h3E4C_CCCD, 32'hC2C8_0000,
    32'h3F00_0001, 32'h3FFF_FFFF, 32'h3A83_126F, 32'hBE99_999A, 32'h4120_0000,
    32'h3DCC_CCCD, 32'hC000_0000, 32'h3F35_04F3, 32'h3FB5_04F3, 32'hBF40_0000};
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, step = 1'b0;
  logic [4:0] sel = '0;
  logic [31:0] a [N], r [N];
  int checks = 0, failures = 0;

  fsf #(.N(N), .W(WT)) dut (.clk, .rst, .load, .step, .sel, .a, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run();
    load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    for (int k = 0; k < 24; k++) begin
      step <= 1'b1; sel <= 5'(k);
      @(posedge clk);
    end
    step <= 1'b0; sel <= '0;
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (r[i] !== ref_mul(a[i], WT[i])) begin
        failures++;
        $display("FAIL lane %0d: %h * %h got %h expected %h", i, a[i], WT[i], r[i], ref_mul(a[i], WT[i]));
      end
    end
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) a[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 100; t++) begin
      logic [31:0] w;
      w = rand_fp(110, 140);
      for (int i = 0; i < N; i++) a[i] = w;
      run();
    end
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < N; i++) a[i] = rand_fp(110, 140);
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
