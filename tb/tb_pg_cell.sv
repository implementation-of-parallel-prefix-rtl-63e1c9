// tb_pg_cell: exhaustive check of the preprocessing cell against
// H = A xor B, G = A and B, P = A or B, written here with arithmetic
// (the two-bit sum of A and B) rather than gates.
module tb_pg_cell;
  logic a, b, h, g, p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  pg_cell dut (.a(a), .b(b), .h(h), .g(g), .p(p));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] sum;
      {a, b} = v[1:0];
      @(posedge clk);
      sum = 2'(a) + 2'(b);
      checks++; if (h !== sum[0]) begin failures++; $display("FAIL h a=%0b b=%0b", a, b); end
      checks++; if (g !== sum[1]) begin failures++; $display("FAIL g a=%0b b=%0b", a, b); end
      checks++; if (p !== (sum != 2'd0)) begin failures++; $display("FAIL p a=%0b b=%0b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
