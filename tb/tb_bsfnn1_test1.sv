// tb_bsfnn1_test1: end-to-end testbench of the whole network at its default
// size (no parameter overrides): 150 iris samples, 15 hidden neurons, the
// built-in weights. It runs the design from reset through all samples and
// three more (the sample generator wraps), and for every output
//   - checks that val advanced by one and that Q equals the reference
//     network (fp_ref_pkg::ref_net) applied to the inputs the network
//     captured for that sample (observed at the sample generator's outputs
//     in the controller's lc1 cycle);
//   - checks that the sample generator wraps: the inputs of output 151 are
//     those of output 1;
//   - checks that outputs come every 51 clock cycles (1 + 24 + 1 + 24 + 1);
// and at the end that the mean output of each species is ordered setosa <
// versicolour < virginica, as the weights were chosen for. It counts how
// often the arithmetic cases of the reference occur in the data
// (multiplier normalization shift and round-up, adder effective
// subtraction, carry, left renormalization, alignment truncation) and the
// wrap of the sample generator, and fails if any never occurs.
module tb_bsfnn1_test1;
  import fp_ref_pkg::*;
  localparam int N_S = 150;
  localparam wvec_t W11 = '{
      32'h3fa7f0e7, 32'h3f3b8965, 32'hbeb79085, 32'h3f7b5997, 32'hbe6d55dc,
      32'h3e98d6b8, 32'hbf6f0123, 32'h3fb9af42, 32'hbf78ede2, 32'hbe3bc5c0,
      32'hbfaa6b05, 32'hbf983cae, 32'h3f377c82, 32'hbf53a772, 32'h3f4cb7fd};
  localparam wvec_t W22 = '{
      32'hbf3d81cd, 32'h3f2b63b6, 32'hbf8ba3b5, 32'h3f94a1bf, 32'h3e110d66,
      32'hbf291a71, 32'h3f24205f, 32'hbfa4a34e, 32'hbecc3cee, 32'hbf420b1f,
      32'h3f300da1, 32'hbf984f24, 32'h3f1257a7, 32'h3f10cc77, 32'h3f94a40f};
  localparam wvec_t W33 = '{
      32'h3d9a7ab8, 32'h3cb681b4, 32'h3b49d33c, 32'h3ccd0167, 32'hbc5d940f,
      32'h3cd671de, 32'hbd646db2, 32'h3dbc59b4, 32'hbd1de046, 32'h3babadee,
      32'hbd9a605f, 32'hbd0c6d63, 32'h3cbf140a, 32'hbd4a20db, 32'h3c86a1a9};

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0]  val;
  logic [31:0] Q;
  logic [63:0] presented [$];
  logic [63:0] first_in, cur_in;
  int checks = 0, failures = 0;
  int outputs = 0, wraps = 0, last_cycle = -1, cycle = 0;
  real species_sum [3] = '{0.0, 0.0, 0.0};

  bsfnn1_test1 dut (.clk, .rst, .val, .Q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // inputs handed to the network, in order
  always @(posedge clk)
    if (!rst && dut.u_fsm.lc1) presented.push_back({dut.u_gen.data1, dut.u_gen.data2});

  initial begin
    logic [7:0] prev_val;
    logic [31:0] e;
    int idx;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    prev_val = 8'd0;
    while (outputs < N_S + 3) begin
      @(posedge clk);
      #1;
      if (val != prev_val) begin
        outputs++;
        checks++;
        if (val != 8'(prev_val + 1)) begin failures++; $display("FAIL val jumped %0d -> %0d", prev_val, val); end
        prev_val = val;
        idx = (int'(val) - 1) % N_S;
        if (outputs > N_S) wraps++;
        cur_in = presented.pop_front();
        if (outputs == 1) first_in = cur_in;
        if (outputs == N_S + 1) begin
          checks++;
          if (cur_in !== first_in) begin failures++; $display("FAIL generator did not wrap to sample 1"); end
        end
        e = ref_net(cur_in[63:32], cur_in[31:0], W11, W22, W33);
        checks++;
        if (Q !== e) begin
          failures++;
          $display("FAIL sample %0d: Q=%h expected %h", idx + 1, Q, e);
        end
        if (outputs <= N_S) species_sum[idx / 50] += to_real(Q);
        if (last_cycle >= 0) begin
          checks++;
          if (cycle - last_cycle != 51) begin
            failures++;
            $display("FAIL output period %0d cycles", cycle - last_cycle);
          end
        end
        last_cycle = cycle;
      end
    end
    $display("outputs=%0d wraps=%0d mean output per species: %f %f %f", outputs, wraps,
             species_sum[0] / 50.0, species_sum[1] / 50.0, species_sum[2] / 50.0);
    $display("cases: mul_norm_shift=%0d mul_round_up=%0d add_eff_sub=%0d add_carry=%0d add_left_norm=%0d add_trunc=%0d",
             ev_mul_norm_shift, ev_mul_round_up, ev_add_eff_sub, ev_add_carry, ev_add_left_norm, ev_add_trunc);
    checks++;
    if (!(species_sum[0] < species_sum[1] && species_sum[1] < species_sum[2])) begin
      failures++;
      $display("FAIL species outputs not ordered");
    end
    checks++;
    if (ev_mul_norm_shift == 0 || ev_mul_round_up == 0 || ev_add_eff_sub == 0 ||
        ev_add_carry == 0 || ev_add_left_norm == 0 || ev_add_trunc == 0 || wraps == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
