// modified_excess_one: conditional +1 stage of the modular adder.
//
// Adds one to the N-bit sum S, modulo 2^N, when P_{N-1:0} or G_{N-1:0} of
// the addition that produced S is set; otherwise passes S through. The
// increment signal is the OR of the two; it enters bit 0 and ripples up an
// AND chain, and each output bit is S_i xor (increment and S_0 ... S_{i-1}).
// The carry out of the chain is dropped.
// Purely combinational, no clock.
module modified_excess_one #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] s,       // sum from the prefix adder
  input  logic         p_all,   // P_{N-1:0}
  input  logic         g_all,   // G_{N-1:0}
  output logic [N-1:0] s_out    // corrected sum S'
);
  logic [N-1:0] t;   // t[i]: carry of the increment into bit i

  assign t[0] = p_all | g_all;
  for (genvar i = 0; i < N; i++) begin : g_bit
    assign s_out[i] = s[i] ^ t[i];
    if (i < N - 1) begin : g_carry
      assign t[i+1] = t[i] & s[i];
    end
  end
endmodule
