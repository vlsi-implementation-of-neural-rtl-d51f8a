// tb_cnt81: self-checking testbench of the sample counter: reset value,
// counting only on inc, wrap-around at 256 and synchronous reset.
module tb_cnt81;
  logic clk = 1'b0, rst = 1'b1, inc = 1'b0;
  logic [7:0] val;
  int model;
  int checks = 0, failures = 0;

  cnt81 dut (.clk, .rst, .inc, .val);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    model = 0;
    for (int i = 0; i < 1200; i++) begin
      inc <= ($urandom % 3) != 0;
      @(posedge clk);
      #1;
      if (inc) model = (model + 1) % 256;
      checks++;
      if (val !== 8'(model)) begin failures++; $display("FAIL step %0d: %0d vs %0d", i, val, model); end
    end
    rst <= 1'b1; inc <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (val !== 8'd0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
