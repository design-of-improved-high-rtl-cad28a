// tb_ling_xor_cell: exhaustive check of the gate-level XOR against the
// truth table of exclusive OR, written out as constants.
module tb_ling_xor_cell;
  logic a, b, y;
  int checks = 0, failures = 0;
  // Expected y for {a,b} = 00, 01, 10, 11.
  localparam logic [3:0] EXPECT = 4'b0110;

  ling_xor_cell dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== EXPECT[v]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
