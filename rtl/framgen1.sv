// framgen1: sample generator for the iris classifier.
//
// Holds N_SAMPLES input pairs (petal length on data1, petal width on data2,
// both IEEE-754 single precision, in centimetres) and presents one pair at a
// time. adv moves to the next pair in the following cycle; after the last
// pair it wraps to the first. Reset (synchronous) selects pair 0.
//
// The table is a ROM computed at elaboration by a constant function, so it
// synthesizes without any data file. Sample k (0-based) belongs to species
// k / 50 mod 3 (setosa, versicolour, virginica). Its length and width are
// whole tenths of a centimetre, drawn from that species' typical range
//   setosa      length 1.0-1.9  width 0.1-0.6
//   versicolour length 3.0-5.1  width 1.0-1.8
//   virginica   length 4.5-6.9  width 1.4-2.5
// with a linear congruential generator x <- 1664525*x + 1013904223 (seed 1,
// two draws per sample, value = low + (x >> 16) mod (high - low + 1)). Each
// tenth count t is converted to the correctly rounded single-precision
// value of t / 10. The pairs stand in for the measured data set and are not
// its published values; the ranges and the 50/50/50 split are the iris data
// set's, the generator is this design's choice.
module framgen1 #(
  parameter int unsigned N_SAMPLES = 150
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        adv,
  output logic [31:0] data1,
  output logic [31:0] data2
);
  typedef logic [63:0] table_t [N_SAMPLES];

  // single-precision word of t/10 for 1 <= t, round to nearest even
  function automatic logic [31:0] tenths_to_fp(int unsigned t);
    longint unsigned num, q, r;
    int k;
    k = 0;
    while ((longint'(t) << k) < 64'd83886080) k++;   // 10 * 2^23
    num = longint'(t) << k;
    q   = num / 10;
    r   = num % 10;
    if (r > 5 || (r == 5 && q[0])) q++;
    if (q[24]) begin
      q = q >> 1;
      k--;
    end
    return {1'b0, 8'(127 + 23 - k), q[22:0]};
  endfunction

  function automatic table_t gen_table();
    table_t tbl;
    int unsigned x, len_t, wid_t;
    int unsigned lo_l [3] = '{10, 30, 45};
    int unsigned hi_l [3] = '{19, 51, 69};
    int unsigned lo_w [3] = '{1, 10, 14};
    int unsigned hi_w [3] = '{6, 18, 25};
    logic [1:0]  sp;
    x = 1;
    for (int k = 0; k < int'(N_SAMPLES); k++) begin
      sp    = 2'((k / 50) % 3);
      x     = x * 1664525 + 1013904223;
      len_t = lo_l[sp] + (x >> 16) % (hi_l[sp] - lo_l[sp] + 1);
      x     = x * 1664525 + 1013904223;
      wid_t = lo_w[sp] + (x >> 16) % (hi_w[sp] - lo_w[sp] + 1);
      tbl[k] = {tenths_to_fp(len_t), tenths_to_fp(wid_t)};
    end
    return tbl;
  endfunction

  localparam table_t ROM = gen_table();

  logic [$clog2(N_SAMPLES)-1:0] addr;

  always_ff @(posedge clk) begin
    if (rst)                                    addr <= '0;
    else if (adv && 32'(addr) == N_SAMPLES - 1) addr <= '0;
    else if (adv)                               addr <= addr + 1'b1;
  end

  assign data1 = ROM[addr][63:32];
  assign data2 = ROM[addr][31:0];
endmodule
