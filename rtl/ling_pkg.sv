// ling_pkg: types shared by the Ling adder cells.
//
// The carry network of a parallel-prefix adder moves (generate, propagate)
// pairs from one level to the next; gp_t bundles one such pair so that the
// prefix tree can hold a whole level as one array. ks_cells() gives the
// number of carry-operator cells a Kogge-Stone tree of a given width uses,
// so that a testbench can compare the built tree with the cell counts
// quoted for the design (5 cells at 4 bits, 17 at 8 bits).
package ling_pkg;

  typedef struct packed {
    logic g;  // group generate (or Ling pseudo-carry once complete)
    logic p;  // group propagate
  } gp_t;

  // Number of Kogge-Stone levels for an n-bit tree: ceil(log2(n)).
  function automatic int unsigned ks_levels(input int unsigned n);
    int unsigned l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  // Carry-operator cells in an n-bit Kogge-Stone tree: level k holds one
  // cell for every position i >= 2^k.
  function automatic int unsigned ks_cells(input int unsigned n);
    int unsigned c = 0;
    for (int unsigned k = 0; k < ks_levels(n); k++) c += n - (1 << k);
    return c;
  endfunction

endpackage
