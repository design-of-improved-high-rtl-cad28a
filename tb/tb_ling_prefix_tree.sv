// tb_ling_prefix_tree: checks the Kogge-Stone tree against a serial
// (ripple) evaluation of the same prefix, H_i = gen_i | prop_i & H_{i-1},
// at 4 bits (exhaustive), 5 bits (exhaustive, not a power of two) and the
// default 32 bits (random). It also checks the cell count formula against
// the counts quoted for the design: 5 cells at 4 bits, 17 at 8 bits.
module tb_ling_prefix_tree;
  import ling_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  g4, p4, h4;
  logic [4:0]  g5, p5, h5;
  logic [31:0] g32, p32, h32;

  ling_prefix_tree #(.N(4)) u4  (.gen(g4),  .prop(p4),  .h(h4));
  ling_prefix_tree #(.N(5)) u5  (.gen(g5),  .prop(p5),  .h(h5));
  ling_prefix_tree          u32 (.gen(g32), .prop(p32), .h(h32));

  function automatic logic [31:0] ripple(input logic [31:0] g, input logic [31:0] p, input int n);
    logic [31:0] r = '0;
    logic run = 1'b0;
    for (int i = 0; i < n; i++) begin
      run = g[i] | (p[i] & run);
      r[i] = run;
    end
    return r;
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string tag);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", tag, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks += 2;
    if (ks_cells(4) != 5)  begin failures++; $display("FAIL cell count 4"); end
    if (ks_cells(8) != 17) begin failures++; $display("FAIL cell count 8"); end

    for (int v = 0; v < 256; v++) begin
      {g4, p4} = 8'(v);
      #1;
      check(32'(h4), ripple(32'(g4), 32'(p4), 4), "n4");
    end
    for (int v = 0; v < 1024; v++) begin
      {g5, p5} = 10'(v);
      #1;
      check(32'(h5), ripple(32'(g5), 32'(p5), 5), "n5");
    end
    for (int v = 0; v < 20000; v++) begin
      g32 = $urandom() & $urandom();          // sparse generates
      p32 = $urandom() | $urandom() | $urandom(); // long propagate runs
      #1;
      check(h32, ripple(g32, p32, 32), "n32");
    end
    // A single generate at bit 0 carried through every position.
    g32 = 32'h1; p32 = '1;
    #1;
    check(h32, '1, "chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
