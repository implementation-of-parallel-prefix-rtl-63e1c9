// tb_rns_ppa_top: end-to-end test of the top at its default parameters
// (N = 5: a 21-bit HRPX with 8 prefix bits, a modulo-31 HMPE, an 8-bit
// KSA). Each component is driven with its own operands every cycle and its
// outputs are compared with integer arithmetic. The mechanisms of the
// components are counted, and each must occur at least once:
//   HRPX: carry from the prefix part into the XNOR/OR chain, and a carry
//         that runs through the whole chain
//   HMPE: no correction, excess-one correction of a sum past 2^N, and the
//         all-ones sum corrected to zero
//   KSA:  carry in set, and carry out produced
module tb_rns_ppa_top;
  localparam int unsigned ITER = 20000;

  int checks = 0, failures = 0;
  int n_hrpx_carry = 0, n_hrpx_through = 0;
  int n_hmpe_plain = 0, n_hmpe_wrap = 0, n_hmpe_zero = 0;
  int n_ksa_cin = 0, n_ksa_cout = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [20:0] hrpx_a, hrpx_s;
  logic [7:0]  hrpx_b;
  logic [4:0]  hmpe_a, hmpe_b, hmpe_s;
  logic [7:0]  ksa_a, ksa_b, ksa_s;
  logic        ksa_cin, ksa_cout;

  rns_ppa_top dut (
    .hrpx_a(hrpx_a), .hrpx_b(hrpx_b), .hrpx_s(hrpx_s),
    .hmpe_a(hmpe_a), .hmpe_b(hmpe_b), .hmpe_s(hmpe_s),
    .ksa_a(ksa_a), .ksa_b(ksa_b), .ksa_cin(ksa_cin), .ksa_s(ksa_s), .ksa_cout(ksa_cout)
  );

  initial begin : watchdog
    repeat (ITER + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned it = 0; it < ITER; it++) begin
      longint ref_hrpx;
      int     ref_hmpe, ref_ksa, raw;
      hrpx_a = 21'($urandom);
      hrpx_b = 8'($urandom);
      if (it % 4 == 0) hrpx_a[20:8] = '0;
      hmpe_a = 5'($urandom_range(30, 0));
      hmpe_b = (it % 10 == 0) ? 5'(31 - int'(hmpe_a)) : 5'($urandom_range(30, 0));
      if (hmpe_a == 5'd0 && hmpe_b == 5'd31) hmpe_b = 5'd0;
      ksa_a = 8'($urandom);
      ksa_b = 8'($urandom);
      ksa_cin = 1'($urandom);
      @(posedge clk);

      ref_hrpx = (longint'(hrpx_a) + (longint'(1) << 21) - 256 + longint'(hrpx_b)) % (longint'(1) << 21);
      checks++;
      if (longint'(hrpx_s) !== ref_hrpx) begin
        failures++; if (failures < 20) $display("FAIL hrpx a=%0h b=%0h got %0h exp %0h", hrpx_a, hrpx_b, hrpx_s, ref_hrpx);
      end
      if (int'(hrpx_a[7:0]) + int'(hrpx_b) >= 256) begin
        n_hrpx_carry++;
        if (hrpx_a[20:8] == '0) n_hrpx_through++;
      end

      raw = int'(hmpe_a) + int'(hmpe_b);
      ref_hmpe = raw % 31;
      checks++;
      if (hmpe_s !== 5'(ref_hmpe)) begin
        failures++; if (failures < 20) $display("FAIL hmpe %0d+%0d got %0d", hmpe_a, hmpe_b, hmpe_s);
      end
      if (raw < 31) n_hmpe_plain++;
      else if (raw == 31) n_hmpe_zero++;
      else n_hmpe_wrap++;

      ref_ksa = int'(ksa_a) + int'(ksa_b) + int'(ksa_cin);
      checks++;
      if ({ksa_cout, ksa_s} !== 9'(ref_ksa)) begin
        failures++; if (failures < 20) $display("FAIL ksa %0d+%0d+%0d got %0d", ksa_a, ksa_b, ksa_cin, {ksa_cout, ksa_s});
      end
      if (ksa_cin) n_ksa_cin++;
      if (ref_ksa > 255) n_ksa_cout++;
    end
    $display("hrpx: carry_into_chain=%0d carry_through_chain=%0d", n_hrpx_carry, n_hrpx_through);
    $display("hmpe: plain=%0d wrap=%0d all_ones_to_zero=%0d", n_hmpe_plain, n_hmpe_wrap, n_hmpe_zero);
    $display("ksa: cin=%0d cout=%0d", n_ksa_cin, n_ksa_cout);
    if (n_hrpx_carry == 0)   failures++;
    if (n_hrpx_through == 0) failures++;
    if (n_hmpe_plain == 0)   failures++;
    if (n_hmpe_wrap == 0)    failures++;
    if (n_hmpe_zero == 0)    failures++;
    if (n_ksa_cin == 0)      failures++;
    if (n_ksa_cout == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
