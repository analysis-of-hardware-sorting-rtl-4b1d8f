// fast_cmp4: 4-bit fast compare unit.
//
// Stage 1 is the compare look-ahead logic (cmp_lookahead4), which marks the
// most significant differing bit. Stage 2 ANDs each mark with the bit-level
// terms ~A_i & B_i (for A<B) and A_i & ~B_i (for A>B) and ORs the four
// products of each kind into the two outputs. Exactly one output is high when
// A != B, neither when A == B. Combinational.
//
// Both stages and both outputs follow the design; this unit is also the
// building block of the wider comparators (fast_cmp), where its inputs may be
// the (A>B, A<B) flag pairs of lower-level units.
module fast_cmp4 (
  input  logic [3:0] a_i,
  input  logic [3:0] b_i,
  output logic       lt_o,
  output logic       gt_o
);
  logic [3:0] cmp;

  cmp_lookahead4 u_cla (.a_i(a_i), .b_i(b_i), .cmp_o(cmp));

  always_comb begin
    lt_o = |(cmp & ~a_i &  b_i);
    gt_o = |(cmp &  a_i & ~b_i);
  end
endmodule
