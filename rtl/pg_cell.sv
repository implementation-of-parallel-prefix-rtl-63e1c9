// pg_cell: preprocessing cell of a parallel-prefix adder.
//
// For one bit position it forms the half-sum H = A xor B, the generate
// G = A and B and the propagate P = A or B. H feeds the sum cell; G and P
// feed the prefix carry tree. Using OR for the propagate that enters the
// tree, and XOR only for the sum, follows the logic-level drawing of the
// preprocessing cell; carries come out the same with either form, because
// OR and XOR differ only when G is already 1.
// Purely combinational, no clock.
module pg_cell (
  input  logic a,  // operand bit A_i
  input  logic b,  // operand bit B_i
  output logic h,  // half-sum H_i
  output logic g,  // generate G_i
  output logic p   // propagate P_i
);
  assign h = a ^ b;
  assign g = a & b;
  assign p = a | b;
endmodule
