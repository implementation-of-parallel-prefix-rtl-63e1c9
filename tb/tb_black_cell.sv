// tb_black_cell: exhaustive check of the black cell. The expected group
// generate is found by passing a carry-in of 0 through the lower span and
// then the upper one; the expected group propagate is set when both spans
// propagate.
module tb_black_cell;
  import ppa_pkg::*;
  gp_t hi, lo, grp;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  black_cell dut (.hi(hi), .lo(lo), .grp(grp));

  // carry out of a span with pair x for carry in c
  function automatic logic through(gp_t x, logic c);
    return x.g ? 1'b1 : (x.p ? c : 1'b0);
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic c0;
      {hi, lo} = v[3:0];
      @(posedge clk);
      c0 = through(hi, through(lo, 1'b0));
      checks++; if (grp.g !== c0) begin failures++; $display("FAIL g v=%0d", v); end
      checks++; if (grp.p !== ((int'(hi.p) + int'(lo.p)) == 2)) begin failures++; $display("FAIL p v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
