// tb_fsfas: self-checking testbench of the two adder blocks of the network:
// fsfas1 (15 lanes of a[i] + b[i]) and fsfas2 (sum of 15 values, chained in
// order r[0] + r[1] + ... + r[14]). Random vectors of mixed sign are compared
// with sums formed by fp_ref_pkg::ref_add in the same order.
module tb_fsfas;
  import fp_ref_pkg::*;
  localparam int N = 15;
  logic [31:0] a [N], b [N], r1 [N], q;
  logic [31:0] exp_q;
  int checks = 0, failures = 0;

  fsfas1 #(.N(N)) dut1 (.a, .b, .r(r1));
  fsfas2 #(.N(N)) dut2 (.r(a), .q);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = rand_fp(115, 135);
        b[i] = (t % 3 == 0) ? {~a[i][31], a[i][30:4], 4'($urandom)} : rand_fp(115, 135);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (r1[i] !== ref_add(a[i], b[i])) begin
          failures++;
          $display("FAIL fsfas1 lane %0d: %h + %h got %h", i, a[i], b[i], r1[i]);
        end
      end
      exp_q = a[0];
      for (int i = 1; i < N; i++) exp_q = ref_add(exp_q, a[i]);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL fsfas2: got %h expected %h", q, exp_q);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
