// fsm_bsfnn2: controller of the bit-serial network.
//
// Takes one sample through bsfnn1 in 51 cycles:
//   LOAD1 (1 cycle)   lc1: stage-1 multipliers capture the inputs
//   MUL1  (24 cycles) clk1 with sel1 = 0..23: stage-1 serial steps
//   LOAD2 (1 cycle)   lc2: stage-2 multipliers capture the hidden values
//   MUL2  (24 cycles) clk2 with sel2 = 0..23: stage-2 serial steps
//   OUT   (1 cycle)   lc3: output register loads; clk_data: the sample
//                     generator and the sample counter advance
// and then starts again with LOAD1 for the next sample. The signal names are
// those of the network's controller; clk1, clk2 and clk_data are one-cycle
// clock enables of clk, not clocks, so the design stays synchronous. The
// state sequence and the use of sel as the serial bit index are this
// design's. Synchronous reset returns to LOAD1.
module fsm_bsfnn2 #(
  parameter int unsigned SIG_BITS = 24
) (
  input  logic       clk,
  input  logic       rst,
  output logic       clk1,
  output logic       clk2,
  output logic       clk_data,
  output logic       lc1,
  output logic       lc2,
  output logic       lc3,
  output logic [4:0] sel1,
  output logic [4:0] sel2
);
  typedef enum logic [2:0] {S_LOAD1, S_MUL1, S_LOAD2, S_MUL2, S_OUT} state_t;
  state_t     state;
  logic [4:0] bitcnt;
  logic       last_bit;

  assign last_bit = (bitcnt == 5'(SIG_BITS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_LOAD1;
      bitcnt <= '0;
    end else begin
      unique case (state)
        S_LOAD1: begin state <= S_MUL1; bitcnt <= '0; end
        S_MUL1:  if (last_bit) begin state <= S_LOAD2; bitcnt <= '0; end
                 else bitcnt <= bitcnt + 5'd1;
        S_LOAD2: begin state <= S_MUL2; bitcnt <= '0; end
        S_MUL2:  if (last_bit) begin state <= S_OUT; bitcnt <= '0; end
                 else bitcnt <= bitcnt + 5'd1;
        S_OUT:   state <= S_LOAD1;
        default: state <= S_LOAD1;
      endcase
    end
  end

  always_comb begin
    lc1      = (state == S_LOAD1);
    clk1     = (state == S_MUL1);
    lc2      = (state == S_LOAD2);
    clk2     = (state == S_MUL2);
    lc3      = (state == S_OUT);
    clk_data = (state == S_OUT);
    sel1     = clk1 ? bitcnt : 5'd0;
    sel2     = clk2 ? bitcnt : 5'd0;
  end

  initial assert (SIG_BITS >= 1 && SIG_BITS <= 32) else $error("fsm_bsfnn2: SIG_BITS out of range");
endmodule
