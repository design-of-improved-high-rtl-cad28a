// ling_pre_cell: pre-processing cell ("basic cell-1") of the Ling adder.
//
// For one bit position it forms the three signals the rest of the adder
// works from:
//   di = a xor b   half-sum, used only by the sum cell
//   gi = a and b   bit generate
//   pi = a or  b   bit propagate (the OR form, often called "transmit"),
//                  which is what makes the Ling factorisation possible
// The three gates and the OR-form propagate follow the published cell; the
// XOR is the gate-level ling_xor_cell. Purely combinational.
module ling_pre_cell (
  input  logic a,
  input  logic b,
  output logic di,
  output logic gi,
  output logic pi
);
  ling_xor_cell u_xor (.a(a), .b(b), .y(di));

  always_comb begin
    gi = a & b;
    pi = a | b;
  end
endmodule
