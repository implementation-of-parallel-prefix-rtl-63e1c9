// bk_prefix_tree: Brent-Kung prefix carry tree.
//
// Takes the bit-level (G_i, P_i) pairs of an N-bit addition and returns
// every prefix carry C_i = G_{i:0}. The tree is the Brent-Kung one: an
// up-sweep of ceil(log2 N) levels builds the spans ending on bits
// 2^(l+1)-1 mod 2^(l+1), then a down-sweep of ceil(log2 N)-1 levels fills
// in the remaining bits from the nearest finished span below them. Bit
// positions that take no part in a level are plain wires; these are the
// buffer cells of the tree. Every bit position drives at most two cells per
// level, which gives the low fan-out this structure is chosen for.
//
// A cell whose result reaches bit 0 only needs the group generate, so it is
// a gray cell, as drawn for the 4-bit tree. With KEEP_P set every cell is a
// black cell instead, so that the group propagate P_{N-1:0} of the whole
// operand is available on p_all; the modular excess-one adder needs it.
// With KEEP_P clear p_all is not computed and reads 0.
// Any N >= 1 is accepted; bits above N are simply absent from the tree.
// Purely combinational, no clock.
module bk_prefix_tree
  import ppa_pkg::*;
#(
  parameter int unsigned N      = 4,     // operand width
  parameter bit          KEEP_P = 1'b0   // 1: black cells everywhere, p_all valid
) (
  input  gp_t  [N-1:0] bit_gp,  // (G_i, P_i) from the preprocessing cells
  output logic [N-1:0] carry,   // carry[i] = G_{i:0}
  output logic         p_all    // P_{N-1:0} (only when KEEP_P)
);
  localparam int unsigned L  = (N > 1) ? $clog2(N) : 0;  // up-sweep levels
  localparam int unsigned ND = (L > 1) ? L - 1 : 0;      // down-sweep levels
  localparam int unsigned NS = L + ND;                   // all levels

  // st[k][i]: pair held by bit position i after k levels
  gp_t [N-1:0] st [NS+1];

  assign st[0] = bit_gp;

  // Up-sweep: level l joins bit i with bit i-2^l where (i+1) is a multiple
  // of 2^(l+1).
  for (genvar l = 0; l < L; l++) begin : g_up
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (((i + 1) % (2 ** (l + 1))) == 0) begin : g_join
        if (!KEEP_P && (i == 2 ** (l + 1) - 1)) begin : g_gray
          gray_cell u_cell (.hi(st[l][i]), .lo_g(st[l][i - 2 ** l].g), .g(st[l+1][i].g));
          assign st[l+1][i].p = 1'b0;
        end else begin : g_black
          black_cell u_cell (.hi(st[l][i]), .lo(st[l][i - 2 ** l]), .grp(st[l+1][i]));
        end
      end else begin : g_buf
        assign st[l+1][i] = st[l][i];
      end
    end
  end

  // Down-sweep: level ll joins bit i with the finished span ending on bit
  // i-2^ll, for the bits halfway between the up-sweep roots of level ll+1.
  for (genvar d = 0; d < ND; d++) begin : g_down
    localparam int unsigned LL = L - 2 - d;
    for (genvar i = 0; i < N; i++) begin : g_bit
      if ((((i + 1) % (2 ** (LL + 1))) == 2 ** LL) && (i >= 2 ** (LL + 1))) begin : g_join
        if (!KEEP_P) begin : g_gray
          gray_cell u_cell (.hi(st[L+d][i]), .lo_g(st[L+d][i - 2 ** LL].g), .g(st[L+d+1][i].g));
          assign st[L+d+1][i].p = 1'b0;
        end else begin : g_black
          black_cell u_cell (.hi(st[L+d][i]), .lo(st[L+d][i - 2 ** LL]), .grp(st[L+d+1][i]));
        end
      end else begin : g_buf
        assign st[L+d+1][i] = st[L+d][i];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    assign carry[i] = st[NS][i].g;
  end
  assign p_all = KEEP_P ? st[NS][N-1].p : 1'b0;
endmodule
