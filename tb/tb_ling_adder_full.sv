// tb_ling_adder_full: the adder at its default width (32 bits) on its own,
// compared with integer addition over directed corner cases and random
// operands, including a carry that runs from cin through every bit.
module tb_ling_adder_full;
  int checks = 0, failures = 0;

  logic [31:0] a, b, s;
  logic ci, co;

  ling_adder dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] exp;
    a = x; b = y; ci = c;
    #1;
    exp = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %h, expected %h", x, y, c, {co, s}, exp);
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
    apply('1, 32'h0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(32'h0, 32'h0, 1'b0);
    apply(32'h0, 32'h0, 1'b1);
    apply(32'h7FFF_FFFF, 32'h1, 1'b0);
    for (int i = 0; i < 32; i++) apply(32'h1 << i, 32'h1 << i, 1'b0);
    for (int i = 0; i < 32; i++) apply(~(32'h1 << i), 32'h0, 1'b1);
    for (int v = 0; v < 100000; v++) apply($urandom(), $urandom(), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
