// ling_xor_cell: two-input exclusive OR built from elementary gates.
//
// y = (~a & b) | (a & ~b): two inverters, two AND gates and one OR gate,
// the gate-level XOR used wherever the adder needs a difference of two
// bits (the half-sum in the pre-processing cell and the sum correction in
// the Ling sum cell). The gate structure follows the published basic-cell
// schematic; writing it with explicit gates rather than ^ is kept so the
// RTL mirrors that schematic. Purely combinational.
module ling_xor_cell (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n, b_n, t0, t1;

  always_comb begin
    a_n = ~a;
    b_n = ~b;
    t0  = a_n & b;
    t1  = a & b_n;
    y   = t0 | t1;
  end
endmodule
