// readj_m1: renormalization of the adder's 25-bit mantissa sum.
//
// Locates the leading one of man1. With a carry in bit 24 the sum moves one
// place right and the exponent must grow by one (addsub = 0, onethloc = 1).
// With the leading one in bit 23 nothing changes (onethloc = 0). With the
// leading one in bit k < 23 the sum moves 23 - k places left and the exponent
// must shrink by that much (addsub = 1, onethloc = 23 - k). An all-zero sum
// gives onethloc = 24 and is_zero. mant is the 23-bit fraction after
// re-alignment (the bit shifted out on a carry is dropped). Purely
// combinational.
module readj_m1 (
  input  logic [24:0] man1,
  output logic [7:0]  onethloc,
  output logic [22:0] mant,
  output logic        addsub,
  output logic        is_zero
);
  logic [23:0] shifted;
  always_comb begin
    onethloc = 8'd24;
    for (int k = 0; k < 23; k++)
      if (man1[k]) onethloc = 8'(23 - k);
    is_zero = (man1 == '0);
    shifted = '0;
    if (man1[24]) begin
      onethloc = 8'd1;
      addsub   = 1'b0;
      mant     = man1[23:1];
    end else if (man1[23]) begin
      onethloc = 8'd0;
      addsub   = 1'b1;
      mant     = man1[22:0];
    end else begin
      addsub   = 1'b1;
      shifted  = man1[23:0] << onethloc;
      mant     = shifted[22:0];
    end
  end
endmodule
