// sum_cell: postprocessing cell of a parallel-prefix adder.
//
// Forms the sum bit S_i = H_i xor C_{i-1} from the half-sum of the bit and
// the carry into it delivered by the prefix tree.
// Purely combinational, no clock.
module sum_cell (
  input  logic h,     // half-sum H_i
  input  logic c_in,  // carry into the bit, C_{i-1}
  output logic s      // sum bit S_i
);
  assign s = h ^ c_in;
endmodule
