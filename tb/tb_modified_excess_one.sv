// tb_modified_excess_one: exhaustive check at the default width N = 5 and
// at N = 3: s_out must be s + (p_all | g_all) modulo 2^N.
module tb_modified_excess_one;
  localparam int unsigned N  = 5;
  localparam int unsigned N3 = 3;
  logic [N-1:0]  s, s_out;
  logic [N3-1:0] s3, s3_out;
  logic          p_all, g_all;
  int checks = 0, failures = 0;
  int incs = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  modified_excess_one dut (.s(s), .p_all(p_all), .g_all(g_all), .s_out(s_out));
  modified_excess_one #(.N(N3)) dut3 (.s(s3), .p_all(p_all), .g_all(g_all), .s_out(s3_out));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (N + 2)); v++) begin
      int inc;
      s     = v[N-1:0];
      s3    = v[N3-1:0];
      p_all = v[N];
      g_all = v[N+1];
      @(posedge clk);
      inc = (p_all | g_all) ? 1 : 0;
      incs += inc;
      checks++;
      if (s_out !== N'((int'(s) + inc) % (1 << N))) begin
        failures++; $display("FAIL s=%0d p=%0b g=%0b got %0d", s, p_all, g_all, s_out);
      end
      checks++;
      if (s3_out !== N3'((int'(s3) + inc) % (1 << N3))) begin
        failures++; $display("FAIL3 s=%0d p=%0b g=%0b got %0d", s3, p_all, g_all, s3_out);
      end
    end
    if (incs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
