// gray_cell: reduced prefix operator (group generate only).
//
// Used where the joined span reaches bit 0 (or the carry in), so that its
// group generate is already the carry out of that bit and no group
// propagate is needed any more:
//   G_{i:j} = G_{i:k} or (P_{i:k} and G_{k-1:j})
// Purely combinational, no clock.
module gray_cell
  import ppa_pkg::*;
(
  input  gp_t  hi,    // (G_{i:k}, P_{i:k})
  input  logic lo_g,  // G_{k-1:j}
  output logic g      // G_{i:j}
);
  assign g = hi.g | (hi.p & lo_g);
endmodule
