// tb_ling_adder: end-to-end check of the Ling adder.
//
// Four instances are compared with integer addition, {cout,sum} = a+b+cin:
//   4 bits  exhaustive, plus the worked example 1001 + 1100 = 1_0101 and
//           the all-ones / all-zeros operand patterns,
//   5 bits  exhaustive (width that is not a power of two),
//   8 bits  exhaustive (the 8-bit configuration the cell counts refer to),
//   32 bits random and directed (default width).
// The mechanisms that distinguish this adder are counted on the 32-bit
// instance, and a mechanism that never occurs counts as a failure:
//   carry_out   - a carry leaves the top bit
//   carry_in    - cin changes the sum
//   full_chain  - a carry from cin travels through all 32 positions
//   h_no_carry  - a pseudo-carry H_{i-1}=1 meets p_{i-1}=0, so the sum
//                 cell must not flip the bit although H is set
//   h_carry     - H_{i-1}=1 with p_{i-1}=1, so the sum cell flips the bit
module tb_ling_adder;
  int checks = 0, failures = 0;
  int n_cout = 0, n_cin = 0, n_chain = 0, n_hnc = 0, n_hc = 0;

  logic [3:0]  a4, b4, s4;   logic ci4, co4;
  logic [4:0]  a5, b5, s5;   logic ci5, co5;
  logic [7:0]  a8, b8, s8;   logic ci8, co8;
  logic [31:0] a32, b32, s32; logic ci32, co32;

  ling_adder #(.N(4)) u4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  ling_adder #(.N(5)) u5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));
  ling_adder #(.N(8)) u8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  ling_adder          u32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  task automatic check(input logic [32:0] got, input logic [32:0] exp, input string tag);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", tag, got, exp);
    end
  endtask

  // Apply one 32-bit vector, check it and count the mechanisms it exercises.
  task automatic run32(input logic [31:0] a, input logic [31:0] b, input logic c);
    logic [32:0] exp, exp_nc, carries;
    a32 = a; b32 = b; ci32 = c;
    #1;
    exp    = 33'(a) + 33'(b) + 33'(c);
    exp_nc = 33'(a) + 33'(b);
    check({co32, s32}, exp, "n32");
    if (exp[32]) n_cout++;
    if (c && exp[31:0] != exp_nc[31:0]) n_cin++;
    if (c && ((a ^ b) == '1)) n_chain++;
    // Carries into each bit from the reference sum, then H_j = g_j | c_j.
    carries = exp ^ 33'(a) ^ 33'(b);
    for (int i = 1; i < 32; i++) begin
      logic hj, pj;
      hj = (a[i-1] & b[i-1]) | carries[i-1];
      pj = a[i-1] | b[i-1];
      if (hj && !pj) n_hnc++;
      if (hj &&  pj) n_hc++;
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked 4-bit example: A=1001, B=1100, Cin=0 gives 1_0101.
    a4 = 4'b1001; b4 = 4'b1100; ci4 = 1'b0;
    #1;
    check(33'({co4, s4}), 33'b10101, "example");
    // All-ones against all-zeros and both zero.
    a4 = 4'b1111; b4 = 4'b0000; #1; check(33'({co4, s4}), 33'b01111, "ones+zeros");
    a4 = 4'b0000; b4 = 4'b1111; #1; check(33'({co4, s4}), 33'b01111, "zeros+ones");
    a4 = 4'b0000; b4 = 4'b0000; #1; check(33'({co4, s4}), 33'b00000, "zeros");

    for (int v = 0; v < (1 << 9); v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      check(33'({co4, s4}), 33'(a4) + 33'(b4) + 33'(ci4), "n4");
    end
    for (int v = 0; v < (1 << 11); v++) begin
      {ci5, a5, b5} = 11'(v);
      #1;
      check(33'({co5, s5}), 33'(a5) + 33'(b5) + 33'(ci5), "n5");
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      #1;
      check(33'({co8, s8}), 33'(a8) + 33'(b8) + 33'(ci8), "n8");
    end

    // Directed 32-bit corners.
    run32('1, 32'h0, 1'b1);             // full carry chain from cin
    run32(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    run32('1, '1, 1'b1);
    run32('1, 32'h1, 1'b0);
    run32(32'h0, 32'h0, 1'b0);
    run32(32'h8000_0000, 32'h8000_0000, 1'b0);
    // Random 32-bit vectors, including sparse and dense operands.
    for (int v = 0; v < 50000; v++) begin
      logic [31:0] a, b;
      a = $urandom();
      b = $urandom();
      case (v % 4)
        1: b = ~a ^ (32'h1 << (v % 32));   // long propagate runs
        2: b = a & $urandom();             // more generates
        default: ;
      endcase
      run32(a, b, 1'($urandom()));
    end

    $display("mechanisms: carry_out=%0d carry_in=%0d full_chain=%0d h_no_carry=%0d h_carry=%0d",
             n_cout, n_cin, n_chain, n_hnc, n_hc);
    checks += 5;
    if (n_cout  == 0) begin failures++; $display("FAIL carry_out never seen"); end
    if (n_cin   == 0) begin failures++; $display("FAIL carry_in never seen"); end
    if (n_chain == 0) begin failures++; $display("FAIL full_chain never seen"); end
    if (n_hnc   == 0) begin failures++; $display("FAIL h_no_carry never seen"); end
    if (n_hc    == 0) begin failures++; $display("FAIL h_carry never seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
