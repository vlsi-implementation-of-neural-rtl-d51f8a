// barrel_shift_r: logarithmic right shifter for mantissa alignment.
//
// Shifts din right by shamt places (0..W) filling with zeros, in five stages
// of 1, 2, 4, 8 and 16 places selected by the bits of shamt. Bits shifted out
// are dropped: the adder truncates the aligned operand. Purely combinational.
module barrel_shift_r #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] din,
  input  logic [4:0]   shamt,
  output logic [W-1:0] dout
);
  logic [W-1:0] stage [6];

  always_comb begin
    stage[0] = din;
    for (int k = 0; k < 5; k++)
      stage[k+1] = shamt[k] ? (stage[k] >> (1 << k)) : stage[k];
    dout = stage[5];
  end
endmodule
