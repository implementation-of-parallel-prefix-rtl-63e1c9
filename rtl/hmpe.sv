// hmpe: hybrid modular parallel-prefix excess-one adder, modulo 2^N - 1.
//
// Adds two residues modulo 2^N - 1 with a single representation of zero.
// A regular Brent-Kung prefix adder (black cells throughout, so that the
// whole-operand P_{N-1:0} is formed next to G_{N-1:0}) adds A and B; the
// modified excess-one unit then adds one to the sum when G_{N-1:0} (the sum
// passed 2^N) or P_{N-1:0} (the sum is exactly 2^N - 1) is set. This folds
// the end-around carry back in and turns the all-ones result into 0.
//
// Inputs are expected in 0 .. 2^N - 2; s is then in the same range and
// equals (a + b) mod (2^N - 1). The choice of Brent-Kung for the prefix
// structure and the default N = 5 are this design's own.
// Purely combinational, no clock.
module hmpe #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  logic [N-1:0] s_raw;
  logic         g_all;
  logic         p_all;

  bk_adder #(.N(N), .KEEP_P(1'b1)) u_add (
    .a(a), .b(b), .cin(1'b0), .s(s_raw), .cout(g_all), .p_all(p_all)
  );

  modified_excess_one #(.N(N)) u_meo (
    .s(s_raw), .p_all(p_all), .g_all(g_all), .s_out(s)
  );
endmodule
