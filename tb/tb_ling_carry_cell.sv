// tb_ling_carry_cell: exhaustive check of the carry operator. The expected
// result is taken from its meaning: the combined group generates a carry
// when a carry of 1 fed below the lower group, or 0, comes out the top of
// the upper group as 1 regardless of the incoming carry (generate), and it
// propagates when an incoming carry always reaches the top.
module tb_ling_carry_cell;
  logic gi, pi, gip, pip, g, p;
  int checks = 0, failures = 0;

  ling_carry_cell dut (.gi(gi), .pi(pi), .gip(gip), .pip(pip), .g(g), .p(p));

  // Carry out of a group with pair (gg, pp) given carry in c.
  function automatic logic group_out(input logic gg, input logic pp, input logic c);
    if (gg) return 1'b1;
    if (pp) return c;
    return 1'b0;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic out0, out1, exp_g, exp_p;
      {gi, pi, gip, pip} = 4'(v);
      #1;
      out0 = group_out(gi, pi, group_out(gip, pip, 1'b0));
      out1 = group_out(gi, pi, group_out(gip, pip, 1'b1));
      exp_g = out0;
      exp_p = pi & pip;
      // With carry in 1 the group output is 1 exactly when it generates or propagates.
      checks += 2;
      if (g !== exp_g) begin failures++; $display("FAIL g v=%b", 4'(v)); end
      if (p !== exp_p) begin failures++; $display("FAIL p v=%b", 4'(v)); end
      checks++;
      if (out1 !== (g | p)) begin failures++; $display("FAIL consistency v=%b", 4'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
