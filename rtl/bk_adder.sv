// bk_adder: regular Brent-Kung parallel-prefix adder.
//
// The three stages of a parallel-prefix adder: preprocessing cells form
// (H_i, G_i, P_i) for every bit, a Brent-Kung prefix carry tree turns the
// (G_i, P_i) pairs into the carries, and sum cells form S_i = H_i xor
// C_{i-1}. The carry in acts as an extra bit below bit 0 with G = Cin and
// P = 0; here it is merged into bit 0 by one gray cell before the tree,
// which yields the same carries with a tree of N rather than N+1 bits.
//
// cout is G_{N-1:0} including the carry in. p_all is the group propagate
// of the operand bits alone, P_{N-1:0}; it is valid only with KEEP_P set
// (see bk_prefix_tree) and reads 0 otherwise.
// Purely combinational, no clock.
module bk_adder
  import ppa_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter bit          KEEP_P = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout,   // G_{N-1:0}, carry out of bit N-1
  output logic         p_all   // P_{N-1:0} of the operands (KEEP_P only)
);
  logic [N-1:0] h;
  gp_t  [N-1:0] bit_gp;
  gp_t  [N-1:0] tree_in;
  logic [N-1:0] carry;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pg_cell u_pg (.a(a[i]), .b(b[i]), .h(h[i]), .g(bit_gp[i].g), .p(bit_gp[i].p));
  end

  // Carry in folded into bit 0: G_0' = G_0 or (P_0 and Cin).
  gray_cell u_cin (.hi(bit_gp[0]), .lo_g(cin), .g(tree_in[0].g));
  assign tree_in[0].p = bit_gp[0].p;
  if (N > 1) begin : g_rest
    assign tree_in[N-1:1] = bit_gp[N-1:1];
  end

  bk_prefix_tree #(.N(N), .KEEP_P(KEEP_P)) u_tree (
    .bit_gp(tree_in), .carry(carry), .p_all(p_all)
  );

  sum_cell u_s0 (.h(h[0]), .c_in(cin), .s(s[0]));
  for (genvar i = 1; i < N; i++) begin : g_post
    sum_cell u_s (.h(h[i]), .c_in(carry[i-1]), .s(s[i]));
  end
  assign cout = carry[N-1];
endmodule
