// tb_bs_mul24: self-checking testbench of the bit-serial significand
// multiplier. For random and corner-case operand pairs it clears the core,
// feeds the serial operand LSB first for exactly W steps and compares the
// 48-bit result with the integer product. It also checks that the result is
// complete exactly W steps after the clear (one step fewer must still differ
// for operands with a set top bit) and that it holds while step is low.
module tb_bs_mul24;
  localparam int W = 24;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, step = 1'b0, a_bit = 1'b0;
  logic [W-1:0] b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  bs_mul24 #(.W(W)) dut (.clk, .rst, .clr, .step, .a_bit, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] bb);
    logic [2*W-1:0] exp_p;
    exp_p = (2*W)'(a) * (2*W)'(bb);
    b   <= bb;
    clr <= 1'b1;
    @(posedge clk);
    clr <= 1'b0;
    for (int k = 0; k < W; k++) begin
      step  <= 1'b1;
      a_bit <= a[k];
      @(posedge clk);
      if (k == W - 2 && a[W-1] && bb != 0) begin
        // one step before the end the top partial product is still missing
        #1;
        checks++;
        if (p == exp_p) begin failures++; $display("early result for %h*%h", a, bb); end
      end
    end
    step  <= 1'b0;
    a_bit <= 1'b0;
    @(posedge clk);
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", a, bb, p, exp_p);
    end
    repeat (2) @(posedge clk);
    checks++;
    if (p !== exp_p) begin failures++; $display("FAIL hold %h * %h", a, bb); end
  endtask

  initial begin
    b = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run('1, '1);
    run('0, '1);
    run('1, '0);
    run(24'h800000, 24'h800000);
    run(24'hFFFFFF, 24'h800001);
    run(24'h000001, 24'hABCDEF);
    for (int i = 0; i < 400; i++) run(24'($urandom), 24'($urandom));
    for (int i = 0; i < 100; i++) run(24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
