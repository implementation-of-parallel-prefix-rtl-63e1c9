// tb_ks_adder: exhaustive check of the 8-bit Kogge-Stone adder (all 2^17
// combinations of a, b and cin) against {cout, s} = a + b + cin, plus
// random checks of a 5-bit and a 16-bit instance.
module tb_ks_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a, b, s;
  logic        cin, cout;
  logic [4:0]  a5, b5, s5;
  logic        cout5;
  logic [15:0] a16, b16, s16;
  logic        cout16;

  ks_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  ks_adder #(.N(5))  dut5  (.a(a5),  .b(b5),  .cin(cin), .s(s5),  .cout(cout5));
  ks_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(cout16));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = v[16:0];
      a5 = 5'($urandom);   b5 = 5'($urandom);
      a16 = 16'($urandom); b16 = (v % 7 == 0) ? ~a16 : 16'($urandom);
      @(posedge clk);
      checks++;
      if ({cout, s} !== 9'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 20) $display("FAIL8 %0d+%0d+%0d got %0d", a, b, cin, {cout, s});
      end
      checks++;
      if ({cout5, s5} !== 6'(int'(a5) + int'(b5) + int'(cin))) begin
        failures++;
        if (failures < 20) $display("FAIL5 %0d+%0d+%0d got %0d", a5, b5, cin, {cout5, s5});
      end
      checks++;
      if ({cout16, s16} !== 17'(int'(a16) + int'(b16) + int'(cin))) begin
        failures++;
        if (failures < 20) $display("FAIL16 %0d+%0d+%0d got %0d", a16, b16, cin, {cout16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
