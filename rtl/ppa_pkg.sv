// ppa_pkg: types shared by the parallel-prefix adder components.
//
// gp_t is the (generate, propagate) pair that every prefix cell consumes
// and produces. A bit-level pair comes from the preprocessing cell; a group
// pair G_{i:j}, P_{i:j} covers the bit span i down to j. The field order
// (g, then p) is this design's own choice.
package ppa_pkg;
  typedef struct packed {
    logic g;  // generate
    logic p;  // propagate
  } gp_t;
endpackage
