// tb_fp_add: self-checking testbench of the combinational floating-point
// adder. Random operand pairs over a range of exponent differences, of both
// signs, are compared bit for bit with fp_ref_pkg::ref_add; normal results
// are also compared with the exact real sum, within the truncation error of
// the alignment (below 2^-22 of the larger operand). Directed cases: equal
// magnitudes of opposite sign, carries, massive cancellation, zeros,
// denormals, infinities, NaN, overflow, exponent differences beyond 24. At
// the end every arithmetic case of the reference must have occurred.
module tb_fp_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp_add dut (.fp_a(a), .fp_b(b), .sum(s));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] e;
    real ex, got, tol;
    a = x; b = y;
    #1;
    e = ref_add(x, y);
    checks++;
    if (s !== e) begin
      failures++;
      $display("FAIL %h + %h: got %h expected %h", x, y, s, e);
    end
    if (!is_zero(e) && !is_inf(e) && !is_nan(e) && !is_inf(x) && !is_inf(y)) begin
      ex  = to_real(x) + to_real(y);
      got = to_real(s);
      tol = (x[30:0] >= y[30:0] ? to_real({1'b0, x[30:0]}) : to_real({1'b0, y[30:0]})) * 2.5e-7;
      checks++;
      if (got - ex > tol || ex - got > tol) begin
        failures++;
        $display("FAIL accuracy %h + %h: %g vs %g", x, y, got, ex);
      end
    end
    #1;
  endtask

  initial begin
    run(32'h3F80_0000, 32'h3F80_0000);   // 1 + 1: carry
    run(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1 = 0
    run(32'h3F80_0001, 32'hBF80_0000);   // massive cancellation
    run(32'h4000_0000, 32'hBFFF_FFFF);   // cancellation with alignment
    run(32'h3F80_0000, 32'h3380_0000);   // tiny addend, within 24
    run(32'h4B80_0000, 32'h3F80_0000);   // difference 24
    run(32'h5000_0000, 32'h3F80_0000);   // difference beyond 24
    run(32'hC000_0000, 32'h3F80_0000);   // -2 + 1
    run(32'h3F80_0000, 32'hC000_0000);   // 1 - 2 (positive operand smaller)
    run(32'h0000_0000, 32'h4120_0000);   // zero
    run(32'h4120_0000, 32'h8000_0000);   // negative zero
    run(32'h0000_0001, 32'h3F80_0000);   // denormal
    run(32'h7F80_0000, 32'h3F80_0000);   // inf
    run(32'h3F80_0000, 32'hFF80_0000);   // -inf
    run(32'h7F80_0000, 32'hFF80_0000);   // inf - inf
    run(32'h7FC0_0000, 32'h3F80_0000);   // NaN
    run(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    run(32'h0080_0000, 32'h8080_0001);   // underflow after cancellation
    run(32'h0080_0000, 32'h80C0_0000);   // result exponent exactly 0
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      x = rand_fp(100, 150);
      y = x;
      y[31]    = $urandom;
      y[30:23] = 8'(int'(x[30:23]) - 3 + int'($urandom % 7));
      y[22:0]  = ($urandom % 4 == 0) ? x[22:0] ^ 23'($urandom % 16) : 23'($urandom);
      run(x, y);
    end
    for (int i = 0; i < 5000; i++) run(rand_fp(90, 160), rand_fp(90, 160));
    for (int i = 0; i < 2000; i++) run($urandom, $urandom);
    checks++;
    if (ev_add_eff_sub == 0 || ev_add_carry == 0 || ev_add_left_norm == 0 ||
        ev_add_trunc == 0 || ev_add_cancel == 0) begin
      failures++;
      $display("FAIL some adder case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
