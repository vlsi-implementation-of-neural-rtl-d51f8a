// tb_fsm_bsfnn2: self-checking testbench of the network controller. Over
// several sample periods it checks, cycle by cycle, the sequence
//   lc1 (1 cycle), clk1 for 24 cycles with sel1 = 0..23, lc2 (1 cycle),
//   clk2 for 24 cycles with sel2 = 0..23, lc3 together with clk_data
// (51 cycles per sample), that no two phases overlap and that the sequence
// restarts from LOAD1 after a reset in the middle of a period.
module tb_fsm_bsfnn2;
  logic clk = 1'b0, rst = 1'b1;
  logic clk1, clk2, clk_data, lc1, lc2, lc3;
  logic [4:0] sel1, sel2;
  int checks = 0, failures = 0;

  fsm_bsfnn2 dut (.clk, .rst, .clk1, .clk2, .clk_data, .lc1, .lc2, .lc3, .sel1, .sel2);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs in cycle c (0..50) of a period
  task automatic expect_cycle(input int c);
    logic e_lc1, e_clk1, e_lc2, e_clk2, e_out;
    logic [4:0] e_sel1, e_sel2;
    e_lc1  = (c == 0);
    e_clk1 = (c >= 1 && c <= 24);
    e_lc2  = (c == 25);
    e_clk2 = (c >= 26 && c <= 49);
    e_out  = (c == 50);
    e_sel1 = e_clk1 ? 5'(c - 1) : 5'd0;
    e_sel2 = e_clk2 ? 5'(c - 26) : 5'd0;
    checks++;
    if ({lc1, clk1, lc2, clk2, lc3, clk_data, sel1, sel2} !==
        {e_lc1, e_clk1, e_lc2, e_clk2, e_out, e_out, e_sel1, e_sel2}) begin
      failures++;
      $display("FAIL cycle %0d: lc1=%b clk1=%b lc2=%b clk2=%b lc3=%b clk_data=%b sel1=%0d sel2=%0d",
               c, lc1, clk1, lc2, clk2, lc3, clk_data, sel1, sel2);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int p = 0; p < 5; p++)
      for (int c = 0; c < 51; c++) begin
        @(negedge clk);
        expect_cycle(c);
      end
    // reset in the middle of a period
    repeat (17) @(posedge clk);
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 51; c++) begin
      @(negedge clk);
      expect_cycle(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
