// tb_hrpx: checks the (4N+1)-bit hybrid adder against
// s = (a + {all ones, b}) mod 2^(4N+1), at the default N = 5 (21 bits,
// 8 prefix bits) and at N = 3 with 4 prefix bits exhaustively. Counts how
// often the prefix part handed a carry to the XNOR/OR chain and how often
// that carry ran through the whole chain; each must occur.
module tb_hrpx;
  int checks = 0, failures = 0;
  int n_carry = 0, n_through = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [20:0] a, s;
  logic [7:0]  b;
  logic [12:0] a3, s3;
  logic [3:0]  b3;

  hrpx dut (.a(a), .b(b), .s(s));
  hrpx #(.N(3), .WIDTH(13), .VAR_BITS(4)) dut3 (.a(a3), .b(b3), .s(s3));

  task automatic check();
    longint ref_s, ref_s3;
    @(posedge clk);
    ref_s  = (longint'(a)  + ((longint'(1) << 21) - 256 + longint'(b)))  % (longint'(1) << 21);
    ref_s3 = (longint'(a3) + ((longint'(1) << 13) - 16  + longint'(b3))) % (longint'(1) << 13);
    if (int'(a[7:0]) + int'(b) >= 256) begin
      n_carry++;
      if (a[20:8] == '0) n_through++;
    end
    checks++;
    if (longint'(s) !== ref_s) begin
      failures++; if (failures < 20) $display("FAIL a=%0h b=%0h got %0h exp %0h", a, b, s, ref_s);
    end
    checks++;
    if (longint'(s3) !== ref_s3) begin
      failures++; if (failures < 20) $display("FAIL3 a=%0h b=%0h got %0h exp %0h", a3, b3, s3, ref_s3);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {a3, b3} = v[16:0];
      a = 21'($urandom);
      b = 8'($urandom);
      if (v % 5 == 0) a[20:8] = '0;        // chain of zeros: a carry must run through it
      if (v % 5 == 1) a[20:8] = '1;
      check();
    end
    $display("cases: carry_into_chain=%0d carry_through_chain=%0d", n_carry, n_through);
    if (n_carry == 0)   failures++;
    if (n_through == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
