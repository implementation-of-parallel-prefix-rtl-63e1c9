// rns_ppa_top: the parallel-prefix adder components side by side.
//
// Brings out, each with its own ports, the three adders a reverse converter
// is assembled from:
//   hrpx  - (4N+1)-bit hybrid adder, s = a + {ones, b} mod 2^(4N+1)
//   hmpe  - modulo 2^N - 1 adder with a single zero
//   ksa   - KSA_N-bit Kogge-Stone adder with carry in and carry out
// The converter that would wire them together is not part of this RTL.
// Everything is combinational; outputs follow the inputs after the logic
// delay, with no clock or reset.
module rns_ppa_top #(
  parameter int unsigned N        = 5,
  parameter int unsigned VAR_BITS = 8,
  parameter int unsigned KSA_N    = 8
) (
  input  logic [4*N:0]       hrpx_a,
  input  logic [VAR_BITS-1:0] hrpx_b,
  output logic [4*N:0]       hrpx_s,

  input  logic [N-1:0]       hmpe_a,
  input  logic [N-1:0]       hmpe_b,
  output logic [N-1:0]       hmpe_s,

  input  logic [KSA_N-1:0]   ksa_a,
  input  logic [KSA_N-1:0]   ksa_b,
  input  logic               ksa_cin,
  output logic [KSA_N-1:0]   ksa_s,
  output logic               ksa_cout
);
  hrpx #(.N(N), .WIDTH(4 * N + 1), .VAR_BITS(VAR_BITS)) u_hrpx (
    .a(hrpx_a), .b(hrpx_b), .s(hrpx_s)
  );

  hmpe #(.N(N)) u_hmpe (
    .a(hmpe_a), .b(hmpe_b), .s(hmpe_s)
  );

  ks_adder #(.N(KSA_N)) u_ksa (
    .a(ksa_a), .b(ksa_b), .cin(ksa_cin), .s(ksa_s), .cout(ksa_cout)
  );
endmodule
