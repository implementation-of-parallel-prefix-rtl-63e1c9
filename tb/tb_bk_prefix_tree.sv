// tb_bk_prefix_tree: checks the Brent-Kung tree at the default N = 4
// exhaustively and at N = 1, 5, 7, 8, 13 and 16 on random inputs, in both
// the gray-cell (KEEP_P = 0) and all-black (KEEP_P = 1) forms. The expected
// carries come from a bit-serial carry recurrence C_i = G_i or (P_i and
// C_{i-1}) with C_{-1} = 0; the expected p_all is the AND of all P_i in the
// all-black form and 0 otherwise.
module tb_bk_prefix_tree;
  import ppa_pkg::*;
  localparam int NUM = 7;
  localparam int unsigned WIDTHS [NUM] = '{4, 1, 5, 7, 8, 13, 16};
  localparam int unsigned ITER = 3000;

  int checks = 0, failures = 0;
  int done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20 * ITER) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar w = 0; w < NUM; w++) begin : g_w
    for (genvar k = 0; k < 2; k++) begin : g_k
      localparam int unsigned N = WIDTHS[w];
      gp_t  [N-1:0] bit_gp;
      logic [N-1:0] carry;
      logic         p_all;

      bk_prefix_tree #(.N(N), .KEEP_P(k[0])) dut (.bit_gp(bit_gp), .carry(carry), .p_all(p_all));

      initial begin
        for (int unsigned it = 0; it < ITER; it++) begin
          logic [N-1:0] exp_c;
          logic         c, exp_p;
          // N = 4: walk through all 256 input patterns first
          if (N == 4 && it < 256) bit_gp = (2 * N)'(it);
          else for (int i = 0; i < N; i++) bit_gp[i] = gp_t'($urandom);
          @(posedge clk);
          c = 1'b0;
          exp_p = 1'b1;
          for (int i = 0; i < N; i++) begin
            c = bit_gp[i].g | (bit_gp[i].p & c);
            exp_c[i] = c;
            exp_p &= bit_gp[i].p;
          end
          if (k == 0) exp_p = 1'b0;
          checks++;
          if (carry !== exp_c) begin
            failures++; $display("FAIL N=%0d K=%0d carry %b exp %b", N, k, carry, exp_c);
          end
          checks++;
          if (p_all !== exp_p) begin
            failures++; $display("FAIL N=%0d K=%0d p_all %b exp %b", N, k, p_all, exp_p);
          end
        end
        done++;
      end
    end
  end

  initial begin
    wait (done == 2 * NUM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
