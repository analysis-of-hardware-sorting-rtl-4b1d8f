// fast_cmp2: reduced 2-bit compare unit, the last level of the 8- and 32-bit
// fast comparators.
//
// Its inputs are not arbitrary numbers: A = {A1, A0} are the A>B flags and
// B = {B1, B0} the A<B flags of the upper (index 1) and lower (index 0)
// halves, so A_i and B_i are never both high. Under that restriction the
// 2-bit magnitude comparison A>B reduces to
//     A>B = A1 | (~A1 & A0 & ~B1 & ~B0)
// i.e. the upper half decides unless it is equal, then the lower half. Only
// A>B is produced: 1 if A>B, 0 if A<B (and 0 if equal). Combinational.
//
// The reduced expression and the single A>B output follow the design.
module fast_cmp2 (
  input  logic [1:0] a_i,
  input  logic [1:0] b_i,
  output logic       gt_o
);
  assign gt_o = a_i[1] | (~a_i[1] & a_i[0] & ~b_i[1] & ~b_i[0]);
endmodule
