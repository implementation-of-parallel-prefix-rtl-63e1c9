// tb_bk_adder: checks the Brent-Kung adder against integer addition:
// {cout, s} = a + b + cin. Exhaustive at the default N = 4 (512 cases),
// random plus all-propagate cases at N = 8 and N = 13 with KEEP_P set,
// where p_all must equal the AND of (a_i or b_i).
module tb_bk_adder;
  int checks = 0, failures = 0;
  int done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // default instance, exhaustive
  logic [3:0] a4, b4, s4;
  logic       cin, cout4, p4;
  bk_adder dut4 (.a(a4), .b(b4), .cin(cin), .s(s4), .cout(cout4), .p_all(p4));

  // wider instances with the group propagate kept
  logic [7:0]  a8, b8, s8;
  logic        cout8, p8;
  logic [12:0] a13, b13, s13;
  logic        cout13, p13;
  bk_adder #(.N(8),  .KEEP_P(1'b1)) dut8  (.a(a8),  .b(b8),  .cin(cin), .s(s8),  .cout(cout8),  .p_all(p8));
  bk_adder #(.N(13), .KEEP_P(1'b1)) dut13 (.a(a13), .b(b13), .cin(cin), .s(s13), .cout(cout13), .p_all(p13));

  task automatic check();
    @(posedge clk);
    checks++;
    if ({cout4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin))) begin
      failures++; $display("FAIL4 %0d+%0d+%0d got %0d", a4, b4, cin, {cout4, s4});
    end
    checks++;
    if ({cout8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin))) begin
      failures++; $display("FAIL8 %0d+%0d+%0d got %0d", a8, b8, cin, {cout8, s8});
    end
    checks++;
    if ({cout13, s13} !== 14'(int'(a13) + int'(b13) + int'(cin))) begin
      failures++; $display("FAIL13 %0d+%0d+%0d got %0d", a13, b13, cin, {cout13, s13});
    end
    checks++;
    if (p8 !== ((a8 | b8) == 8'hFF)) begin failures++; $display("FAIL8 p_all"); end
    checks++;
    if (p13 !== ((a13 | b13) == 13'h1FFF)) begin failures++; $display("FAIL13 p_all"); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a4, b4} = v[8:0];
      a8 = 8'($urandom); b8 = 8'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
      check();
    end
    // all-propagate operands: the carry in must ripple through the whole tree
    for (int i = 0; i < 200; i++) begin
      cin = 1'($urandom);
      a8 = 8'($urandom);  b8 = ~a8;
      a13 = 13'($urandom); b13 = ~a13;
      a4 = 4'($urandom); b4 = ~a4;
      check();
    end
    for (int i = 0; i < 3000; i++) begin
      cin = 1'($urandom);
      a4 = 4'($urandom); b4 = 4'($urandom);
      a8 = 8'($urandom); b8 = 8'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
