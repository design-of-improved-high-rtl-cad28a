// ling_prefix_tree: Kogge-Stone carry network producing Ling pseudo-carries.
//
// Input position i carries the pair (gen[i], prop[i]) where, in the Ling
// adder, gen[i] = g_i and prop[i] = p_{i-1} (the OR-form propagate of the
// bit below). Prefix-combining these pairs from bit 0 upwards gives
//   H_i = g_i | p_{i-1}&g_{i-1} | p_{i-1}&p_{i-2}&g_{i-2} | ...
//       = g_i | c_i,
// Ling's pseudo-carry, from which the true carry is c_{i+1} = p_i & H_i.
// Because g_j implies p_j, each term here has one propagate fewer than the
// matching term of the ordinary carry, which is the Ling simplification.
//
// Structure: ceil(log2 N) levels. At level k every position i >= 2^k has one
// ling_carry_cell that combines its pair with the pair at i - 2^k; positions
// below 2^k pass their pair on unchanged. This is the radix-2 (valency-2)
// Kogge-Stone arrangement with N-2^k cells at level k: 5 cells for 4 bits,
// 17 for 8 bits and 129 for 32 bits. The tree shape and cell count follow
// the published design; the choice of feeding (g_i, p_{i-1}) pairs into it
// is this implementation's way of making the tree compute H.
//
// Purely combinational; any N >= 1 is accepted. Position 0 has nothing below
// it, so h[0] is gen[0] passed straight through.
module ling_prefix_tree
  import ling_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] gen,
  input  logic [N-1:0] prop,
  output logic [N-1:0] h
);
  localparam int unsigned L = ks_levels(N);

  gp_t in_pairs [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign in_pairs[i] = '{g: gen[i], p: prop[i]};
  end

  // Each level keeps its own arrays so that no variable spans two levels.
  for (genvar k = 0; k < L; k++) begin : g_level
    gp_t cur [N];  // pairs entering level k
    gp_t nxt [N];  // pairs leaving level k

    if (k == 0) begin : g_first
      assign cur = in_pairs;
    end else begin : g_chain
      assign cur = g_level[k-1].nxt;
    end

    for (genvar i = 0; i < N; i++) begin : g_pos
      if (i >= (1 << k)) begin : g_cell
        ling_carry_cell u_cell (
          .gi (cur[i].g),
          .pi (cur[i].p),
          .gip(cur[i-(1<<k)].g),
          .pip(cur[i-(1<<k)].p),
          .g  (nxt[i].g),
          .p  (nxt[i].p)
        );
      end else begin : g_pass
        assign nxt[i] = cur[i];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    if (L == 0) begin : g_single
      assign h[i] = in_pairs[i].g;
    end else begin : g_last
      assign h[i] = g_level[L-1].nxt[i].g;
    end
  end
endmodule
