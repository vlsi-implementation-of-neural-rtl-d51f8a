// cnt81: sample counter.
//
// A W-bit counter that increments by one in each cycle where inc is high and
// wraps at 2^W. In the network it counts the outputs produced, so after the
// k-th output has been loaded val = k and identifies the sample the output
// belongs to (1..50 the first species, and so on). Synchronous reset to 0.
module cnt81 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         inc,
  output logic [W-1:0] val
);
  always_ff @(posedge clk) begin
    if (rst)      val <= '0;
    else if (inc) val <= val + 1'b1;
  end
endmodule
