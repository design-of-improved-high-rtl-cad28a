// ling_sum_cell: post-processing cell ("basic cell-3") of the Ling adder.
//
// The Ling tree delivers the pseudo-carry H_{i-1} instead of the carry
// c_i = P_{i-1} & H_{i-1}. The missing AND is folded into the sum:
//   S_i = H_{i-1} ? (d_i xor P_{i-1}) : d_i
// The XOR works in parallel with the carry tree, and the late-arriving
// H_{i-1} only drives the select of a 2:1 multiplexer. This XOR-plus-mux
// structure follows the published Ling basic cell. Purely combinational.
module ling_sum_cell (
  input  logic di,      // half-sum a_i xor b_i
  input  logic p_prev,  // propagate P_{i-1} = a_{i-1} | b_{i-1}
  input  logic h_prev,  // Ling pseudo-carry H_{i-1}
  output logic si
);
  logic d_xor_p;

  ling_xor_cell u_xor (.a(di), .b(p_prev), .y(d_xor_p));

  always_comb si = h_prev ? d_xor_p : di;
endmodule
