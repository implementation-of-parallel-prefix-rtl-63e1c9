// tb_hmpe: checks the modulo 2^N - 1 adder against (a + b) mod (2^N - 1)
// for every pair of residues 0 .. 2^N - 2, at the default N = 5 and at
// N = 3 and N = 8. It also counts how often each of the three cases
// occurred: no correction, correction because the sum passed 2^N, and
// correction of the all-ones sum to zero; each must occur.
module tb_hmpe;
  int checks = 0, failures = 0;
  int n_plain = 0, n_wrap = 0, n_zero = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] a, b, s;
  logic [2:0] a3, b3, s3;
  logic [7:0] a8, b8, s8;

  hmpe dut (.a(a), .b(b), .s(s));
  hmpe #(.N(3)) dut3 (.a(a3), .b(b3), .s(s3));
  hmpe #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 255; x++) begin
      for (int y = 0; y < 255; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        a = 5'(x % 31); b = 5'(y % 31);
        a3 = 3'(x % 7); b3 = 3'(y % 7);
        @(posedge clk);
        if (x < 31 && y < 31) begin
          if (x + y < 31) n_plain++;
          else if (x + y == 31) n_zero++;
          else n_wrap++;
        end
        checks++;
        if (s !== 5'((int'(a) + int'(b)) % 31)) begin
          failures++; if (failures < 20) $display("FAIL5 %0d+%0d got %0d", a, b, s);
        end
        checks++;
        if (s3 !== 3'((int'(a3) + int'(b3)) % 7)) begin
          failures++; if (failures < 20) $display("FAIL3 %0d+%0d got %0d", a3, b3, s3);
        end
        checks++;
        if (s8 !== 8'((int'(a8) + int'(b8)) % 255)) begin
          failures++; if (failures < 20) $display("FAIL8 %0d+%0d got %0d", a8, b8, s8);
        end
      end
    end
    $display("cases: plain=%0d wrap=%0d all_ones_to_zero=%0d", n_plain, n_wrap, n_zero);
    if (n_plain == 0) failures++;
    if (n_wrap == 0)  failures++;
    if (n_zero == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
