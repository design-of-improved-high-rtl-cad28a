// ling_carry_cell: carry-operator cell ("basic cell-2") of the prefix tree.
//
// Combines the (generate, propagate) pair of an upper group (gi, pi) with
// that of the adjacent lower group (gip, pip):
//   g = (pi & gip) | gi
//   p =  pi & pip
// two AND gates and one OR gate, as in the published cell. In the Ling
// adder the same operator is applied to (g_i, p_{i-1}) pairs, so that the
// completed g is the Ling pseudo-carry H rather than the true carry.
// Purely combinational.
module ling_carry_cell (
  input  logic gi,
  input  logic pi,
  input  logic gip,
  input  logic pip,
  output logic g,
  output logic p
);
  always_comb begin
    g = (pi & gip) | gi;
    p = pi & pip;
  end
endmodule
