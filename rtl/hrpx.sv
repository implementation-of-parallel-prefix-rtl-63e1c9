// hrpx: hybrid regular parallel-prefix XNOR/OR adder.
//
// A (4N+1)-bit addition in which only the low VAR_BITS bits of the second
// operand vary and all its higher bits are the constant 1:
//   s = (a + {all ones, b}) mod 2^(4N+1).
// The low part is added by a regular Brent-Kung prefix adder. Its carry out
// enters a ripple chain of XNOR/OR cells over the high part, where each
// full adder has shrunk to two gates because one of its inputs is constant.
// The carry out of the chain is dropped.
//
// The width 4N+1 with N = 5 follows the document; VAR_BITS = 8 is the
// number of prefix bit columns in its drawing. That the constant bits are
// ones is inferred from the XNOR/OR gates.
// Purely combinational, no clock.
module hrpx #(
  parameter int unsigned N        = 5,
  parameter int unsigned WIDTH    = 4 * N + 1,
  parameter int unsigned VAR_BITS = 8
) (
  input  logic [WIDTH-1:0]    a,   // fully variable operand
  input  logic [VAR_BITS-1:0] b,   // variable low part of the second operand
  output logic [WIDTH-1:0]    s
);
  logic c_low;
  logic p_unused;   // P_{VAR_BITS-1:0} is not needed here

  bk_adder #(.N(VAR_BITS), .KEEP_P(1'b0)) u_low (
    .a(a[VAR_BITS-1:0]), .b(b), .cin(1'b0),
    .s(s[VAR_BITS-1:0]), .cout(c_low), .p_all(p_unused)
  );

  xnor_or_chain #(.M(WIDTH - VAR_BITS)) u_high (
    .a(a[WIDTH-1:VAR_BITS]), .c_in(c_low), .s(s[WIDTH-1:VAR_BITS])
  );
endmodule
