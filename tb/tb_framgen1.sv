// tb_framgen1: self-checking testbench of the sample generator.
//   - First pass, adv every cycle: every pair must be a whole number of
//     tenths of a centimetre, encoded as the correctly rounded single of
//     t/10 (converted here through double precision), and lie in the petal
//     range of its species (samples 1..50 setosa, 51..100 versicolour,
//     101..150 virginica); the table must not be degenerate (many distinct
//     values).
//   - Second phase, adv random: the generator must step exactly one sample
//     per adv, hold otherwise, and wrap after the last sample, which is
//     checked against the values recorded in the first pass.
module tb_framgen1;
  import fp_ref_pkg::*;
  localparam int N = 150;
  logic clk = 1'b0, rst = 1'b1, adv = 1'b0;
  logic [31:0] data1, data2;
  logic [63:0] rec [N];
  int idx, distinct;
  int checks = 0, failures = 0;
  int lmin[3] = '{10, 30, 45};
  int lmax[3] = '{19, 51, 69};
  int wmin[3] = '{1, 10, 14};
  int wmax[3] = '{6, 18, 25};

  framgen1 #(.N_SAMPLES(N)) dut (.clk, .rst, .adv, .data1, .data2);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // single-precision bits of t/10, rounding the double t/10.0 to 24 bits
  function automatic logic [31:0] single_of_tenths(int t);
    logic [63:0] d;
    logic [23:0] m;
    logic [7:0]  e;
    d = $realtobits(real'(t) / 10.0);
    m = {1'b1, d[51:29]};
    e = 8'(int'(d[62:52]) - 1023 + 127);
    if (d[28] && (d[27:0] != 0 || m[0])) begin
      m = m + 24'd1;
      if (m == 24'd0) e = e + 8'd1;
    end
    return {1'b0, e, m[22:0]};
  endfunction

  task automatic check_value(input int sp, input logic [31:0] v, input int lo, input int hi, input string what);
    int t;
    t = int'(to_real(v) * 10.0);   // real to int conversion rounds
    checks++;
    if (v !== single_of_tenths(t) || t < lo || t > hi) begin
      failures++;
      $display("FAIL sample %0d %s = %h (%0d tenths), species %0d", idx, what, v, t, sp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    adv <= 1'b1;
    distinct = 0;
    for (idx = 0; idx < N; idx++) begin
      rec[idx] = {data1, data2};
      check_value(idx / 50, data1, lmin[idx / 50], lmax[idx / 50], "length");
      check_value(idx / 50, data2, wmin[idx / 50], wmax[idx / 50], "width");
      if (idx > 0 && rec[idx] != rec[idx - 1]) distinct++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (distinct < N / 2) begin failures++; $display("FAIL table degenerate: %0d changes", distinct); end
    idx = 0;
    for (int i = 0; i < 2 * N + 7; i++) begin
      checks++;
      if ({data1, data2} !== rec[idx]) begin
        failures++;
        $display("FAIL step %0d: sample %0d shows %h %h", i, idx, data1, data2);
      end
      adv <= ($urandom % 2) != 0;
      @(posedge clk);
      #1;
      if (adv) idx = (idx + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
