// xnor_or_chain: simplified ripple-carry adder with a constant-one operand.
//
// A full adder whose second operand bit is the constant 1 reduces to
// sum = not (a xor c) and carry = a or c. M such cells in a ripple chain
// add the all-ones word (2^M - 1) plus the incoming carry to a:
//   s = (a + 2^M - 1 + c_in) mod 2^M.
// The carry out of the top cell is not needed by its users and is not
// produced.
// Purely combinational, no clock.
module xnor_or_chain #(
  parameter int unsigned M = 13
) (
  input  logic [M-1:0] a,     // variable operand bits
  input  logic         c_in,  // carry from the bits below
  output logic [M-1:0] s
);
  logic [M-1:0] c;   // c[i]: carry into bit i

  assign c[0] = c_in;
  for (genvar i = 0; i < M; i++) begin : g_bit
    assign s[i] = ~(a[i] ^ c[i]);
    if (i < M - 1) begin : g_carry
      assign c[i+1] = a[i] | c[i];
    end
  end
endmodule
