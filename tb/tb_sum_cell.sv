// tb_sum_cell: exhaustive check of the sum cell against the low bit of
// H + C.
module tb_sum_cell;
  logic h, c_in, s;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sum_cell dut (.h(h), .c_in(c_in), .s(s));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] sum;
      {h, c_in} = v[1:0];
      @(posedge clk);
      sum = 2'(h) + 2'(c_in);
      checks++; if (s !== sum[0]) begin failures++; $display("FAIL v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
