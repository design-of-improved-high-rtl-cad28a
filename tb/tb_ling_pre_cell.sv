// tb_ling_pre_cell: exhaustive check of the pre-processing cell. The
// expected half-sum, generate and propagate come from the two-bit
// arithmetic sum a+b: generate is its carry, half-sum its low bit, and
// propagate is set whenever the sum is non-zero.
module tb_ling_pre_cell;
  logic a, b, di, gi, pi;
  int checks = 0, failures = 0;

  ling_pre_cell dut (.a(a), .b(b), .di(di), .gi(gi), .pi(pi));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int s;
      {a, b} = 2'(v);
      #1;
      s = int'(a) + int'(b);
      checks += 3;
      if (di !== s[0])    begin failures++; $display("FAIL di a=%b b=%b", a, b); end
      if (gi !== s[1])    begin failures++; $display("FAIL gi a=%b b=%b", a, b); end
      if (pi !== (s != 0)) begin failures++; $display("FAIL pi a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
