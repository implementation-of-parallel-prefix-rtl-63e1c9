// black_cell: full prefix operator (group generate and group propagate).
//
// Combines the pair of the upper span (i:k) with the pair of the adjacent
// lower span (k-1:j) into the pair of the joined span (i:j):
//   G_{i:j} = G_{i:k} or (P_{i:k} and G_{k-1:j})
//   P_{i:j} = P_{i:k} and P_{k-1:j}
// Purely combinational, no clock.
module black_cell
  import ppa_pkg::*;
(
  input  gp_t hi,   // (G_{i:k},   P_{i:k})
  input  gp_t lo,   // (G_{k-1:j}, P_{k-1:j})
  output gp_t grp   // (G_{i:j},   P_{i:j})
);
  assign grp.g = hi.g | (hi.p & lo.g);
  assign grp.p = hi.p & lo.p;
endmodule
