// ling_adder: N-bit Ling parallel-prefix adder (top level).
//
// sum + cout = a + b + cin, computed in three stages:
//   1. pre-processing: one ling_pre_cell per bit gives d_i = a^b,
//      g_i = a&b and p_i = a|b.
//   2. carry network: ling_prefix_tree, a Kogge-Stone tree of two-input
//      carry operators, turns the pairs (g_i, p_{i-1}) into the Ling
//      pseudo-carries H_i = g_i | c_i. Carry-in enters at bit 0 by
//      merging it into the generate of that position (H_0 = g_0 | cin).
//   3. post-processing: one ling_sum_cell per bit gives
//      S_i = H_{i-1} ? (d_i ^ p_{i-1}) : d_i; for bit 0 the cell sees
//      H_{-1} = cin and p_{-1} = 1, so S_0 = d_0 ^ cin.
// The carry-out is c_N = p_{N-1} & H_{N-1}.
//
// The three cell types, their gate equations, the Kogge-Stone arrangement
// (8 pre-cells, 17 carry cells and 8 sum cells at 8 bits) and the 32-bit
// default width follow the published design. The carry-in handling and the
// carry-out gate are this implementation's choices.
//
// Interface: plain operand buses in, sum and carry-out out. Timing: purely
// combinational, no clock; the result is valid one propagation delay after
// the inputs settle. N must be at least 2.
module ling_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] d, g, p;     // per-bit half-sum, generate, propagate
  logic [N-1:0] gen, prop;   // tree inputs
  logic [N-1:0] h;           // Ling pseudo-carries

  for (genvar i = 0; i < N; i++) begin : g_pre
    ling_pre_cell u_pre (.a(a[i]), .b(b[i]), .di(d[i]), .gi(g[i]), .pi(p[i]));
  end

  // Position i sees its own generate and the propagate of the bit below.
  always_comb begin
    gen = g;
    gen[0] = g[0] | cin;
    prop = {p[N-2:0], 1'b1};
  end

  ling_prefix_tree #(.N(N)) u_tree (.gen(gen), .prop(prop), .h(h));

  ling_sum_cell u_sum0 (.di(d[0]), .p_prev(1'b1), .h_prev(cin), .si(sum[0]));

  for (genvar i = 1; i < N; i++) begin : g_sum
    ling_sum_cell u_sum (.di(d[i]), .p_prev(p[i-1]), .h_prev(h[i-1]), .si(sum[i]));
  end

  assign cout = p[N-1] & h[N-1];
endmodule
