// fp_pkg: shared types and constants for the IEEE-754 single precision
// datapath of the bit-serial neural network.
//
// A 32-bit word is sign | exponent[7:0] | fraction[22:0], exponent bias 127.
// unpacked_t is what the unpack stage hands to the rest of a multiplier:
// the fields, a 32-bit significand (hidden bit, fraction, eight zeros) and the
// three class flags of the input (infinity, not-a-number, zero). Denormal
// inputs are classed as zero: this design flushes them, it does not compute
// with them.
package fp_pkg;

  localparam int unsigned EXP_BIAS = 127;

  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } float32_t;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [31:0] sig;
    logic        is_inf;
    logic        is_nan;
    logic        is_z;
  } unpacked_t;

endpackage
