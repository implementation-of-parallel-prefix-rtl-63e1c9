// ks_adder: Kogge-Stone parallel-prefix adder with carry in and carry out.
//
// Preprocessing cells form (H_i, G_i, P_i) for each bit. The carry in is an
// extra position below bit 0 with G = Cin and P = 0, so the prefix network
// spans N+1 positions. At level l every position j >= 2^l joins its span
// with the one ending 2^l positions lower, so after ceil(log2(N+1)) levels
// (4 for the default 8 bits) every position holds its carry. A join whose
// result already reaches the carry-in position is a gray cell (generate
// only; its propagate is 0 because P of the carry-in position is 0), the
// others are black cells; positions that are already finished are wires.
// Sum cells then form S_i = H_i xor C_{i-1}, and Cout is the carry out of
// the top bit.
// Purely combinational, no clock.
module ks_adder
  import ppa_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int unsigned M = N + 1;       // positions, carry in included
  localparam int unsigned L = $clog2(M);   // levels

  logic [N-1:0] h;
  // st[l][j]: pair of position j after l levels; j = 0 is the carry in,
  // j = i+1 is operand bit i.
  gp_t  [M-1:0] st [L+1];

  assign st[0][0].g = cin;
  assign st[0][0].p = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_pre
    pg_cell u_pg (.a(a[i]), .b(b[i]), .h(h[i]), .g(st[0][i+1].g), .p(st[0][i+1].p));
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar j = 0; j < M; j++) begin : g_pos
      if (j < 2 ** l) begin : g_buf
        assign st[l+1][j] = st[l][j];
      end else if (j < 2 ** (l + 1)) begin : g_gray
        gray_cell u_cell (.hi(st[l][j]), .lo_g(st[l][j - 2 ** l].g), .g(st[l+1][j].g));
        assign st[l+1][j].p = 1'b0;
      end else begin : g_black
        black_cell u_cell (.hi(st[l][j]), .lo(st[l][j - 2 ** l]), .grp(st[l+1][j]));
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_post
    sum_cell u_s (.h(h[i]), .c_in(st[L][i].g), .s(s[i]));
  end
  assign cout = st[L][N].g;
endmodule
