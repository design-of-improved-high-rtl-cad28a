// tb_ling_sum_cell: exhaustive check of the Ling sum cell. For every input
// combination that can occur in an adder (H_{i-1}=1 needs no special case),
// the sum bit must equal d_i xor c_i with the true carry
// c_i = P_{i-1} & H_{i-1}.
module tb_ling_sum_cell;
  logic di, p_prev, h_prev, si;
  int checks = 0, failures = 0;

  ling_sum_cell dut (.di(di), .p_prev(p_prev), .h_prev(h_prev), .si(si));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic c;
      {di, p_prev, h_prev} = 3'(v);
      #1;
      c = p_prev && h_prev;
      checks++;
      if (si !== (c ? !di : di)) begin
        failures++;
        $display("FAIL d=%b p=%b h=%b s=%b", di, p_prev, h_prev, si);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
