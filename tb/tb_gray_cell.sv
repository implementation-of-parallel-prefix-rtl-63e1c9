// tb_gray_cell: exhaustive check of the gray cell: its output must be the
// carry out of the upper span when the lower span delivers lo_g.
module tb_gray_cell;
  import ppa_pkg::*;
  gp_t  hi;
  logic lo_g, g;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  gray_cell dut (.hi(hi), .lo_g(lo_g), .g(g));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expect_g;
      {hi, lo_g} = v[2:0];
      @(posedge clk);
      if (hi.g) expect_g = 1'b1;
      else if (hi.p) expect_g = lo_g;
      else expect_g = 1'b0;
      checks++; if (g !== expect_g) begin failures++; $display("FAIL v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
