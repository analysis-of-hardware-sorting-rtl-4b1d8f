// cmp_lookahead4: compare look-ahead logic of the 4-bit fast compare unit.
//
// For two 4-bit inputs it raises at most one of CMP3..CMP0: CMP_i is high when
// bit i is the most significant position in which A and B differ. Each bit
// pair is XORed; CMP3 is the top XOR itself and every lower CMP_i is its XOR
// ANDed with the inverted XORs of all more significant positions. If A == B
// no CMP is high. Purely combinational, no clock.
//
// The structure (XOR per bit, inverters and AND gates, one-hot outputs)
// follows the look-ahead comparator the design builds on; port names are
// this implementation's.
module cmp_lookahead4 (
  input  logic [3:0] a_i,
  input  logic [3:0] b_i,
  output logic [3:0] cmp_o
);
  logic [3:0] x;

  always_comb begin
    x        = a_i ^ b_i;
    cmp_o[3] = x[3];
    cmp_o[2] = ~x[3] & x[2];
    cmp_o[1] = ~x[3] & ~x[2] & x[1];
    cmp_o[0] = ~x[3] & ~x[2] & ~x[1] & x[0];
  end
endmodule
