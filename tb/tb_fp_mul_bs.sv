// tb_fp_mul_bs: self-checking testbench of the bit-serial IEEE-754
// multiplier. Each operation is a load cycle followed by 24 step cycles
// with sel = 0..23; the product must be valid in the next cycle (latency
// check: the product is also sampled before the last step and must not
// yet be final for operands whose serial significand has its top bit set,
// which is always the case for normal numbers). Results are compared bit for
// bit with fp_ref_pkg::ref_mul and, for normal results, with the exact real
// product to within one unit in the last place. Corner cases: zeros,
// denormals, infinities, NaN, infinity times zero, exponent overflow and
// underflow, rounding that carries into a new leading bit.
module tb_fp_mul_bs;
  import fp_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, step = 1'b0;
  logic [4:0] sel = '0;
  logic [31:0] a, b, z;
  int checks = 0, failures = 0;

  fp_mul_bs dut (.clk, .rst, .load, .step, .sel, .a, .b, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real abs_r(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] e;
    real ex, got;
    e = ref_mul(x, y);
    a <= x;
    b <= y;
    load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    for (int k = 0; k < 24; k++) begin
      step <= 1'b1;
      sel  <= 5'(k);
      @(posedge clk);
    end
    step <= 1'b0;
    sel  <= '0;
    #1;
    checks++;
    if (z !== e) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", x, y, z, e);
    end
    if (!is_zero(e) && !is_inf(e) && !is_nan(e)) begin
      ex  = to_real(x) * to_real(y);
      got = to_real(z);
      checks++;
      if (abs_r(got - ex) > abs_r(ex) * 1.2e-7) begin
        failures++;
        $display("FAIL accuracy %h * %h: %g vs %g", x, y, got, ex);
      end
    end
    @(posedge clk);
  endtask

  // Latency: with a 23-step run the result must not be the final one.
  task automatic short_run(input logic [31:0] x, input logic [31:0] y);
    a <= x; b <= y; load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    for (int k = 0; k < 23; k++) begin
      step <= 1'b1; sel <= 5'(k);
      @(posedge clk);
    end
    step <= 1'b0; sel <= '0;
    #1;
    checks++;
    if (z === ref_mul(x, y)) begin failures++; $display("FAIL result complete after 23 steps"); end
    @(posedge clk);
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run(32'h3F80_0000, 32'h3F80_0000);   // 1 * 1
    run(32'h4040_0000, 32'hC000_0000);   // 3 * -2
    run(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // near 2 * near 2: normalize shift
    run(32'h3FE1_2000, 32'h3F91_8E00);   // product 2 - 2^-24: rounding carry
    run(32'h0000_0000, 32'h4120_0000);   // zero
    run(32'h8000_0000, 32'h4120_0000);   // negative zero
    run(32'h0000_1234, 32'h4120_0000);   // denormal flushed
    run(32'h7F80_0000, 32'h4120_0000);   // inf
    run(32'h7F80_0000, 32'h0000_0000);   // inf * 0 = NaN
    run(32'h7FC0_0001, 32'h3F80_0000);   // NaN
    run(32'h7F00_0000, 32'h7F00_0000);   // overflow
    run(32'h0080_0000, 32'h0080_0000);   // underflow
    run(32'h3F00_0000, 32'h0100_0000);   // result exponent 1
    run(32'h3F00_0000, 32'h0080_0000);   // result exponent 0: flushed
    short_run(32'h3FC0_0000, 32'h3FC0_0000);
    for (int i = 0; i < 1500; i++) run(rand_fp(100, 154), rand_fp(100, 154));
    for (int i = 0; i < 300; i++)  run($urandom, $urandom);
    checks++;
    if (ev_mul_norm_shift == 0 || ev_mul_round_up == 0 || ev_mul_round_carry == 0) begin
      failures++;
      $display("FAIL some rounding case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
