// tb_xnor_or_chain: checks s = (a + 2^M - 1 + c_in) mod 2^M, exhaustively at
// M = 4 and on random operands plus the carry-through corner cases at the
// default M = 13.
module tb_xnor_or_chain;
  localparam int unsigned M  = 13;
  localparam int unsigned M4 = 4;
  logic [M-1:0]  a, s;
  logic [M4-1:0] a4, s4;
  logic          c_in;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  xnor_or_chain dut (.a(a), .c_in(c_in), .s(s));
  xnor_or_chain #(.M(M4)) dut4 (.a(a4), .c_in(c_in), .s(s4));

  task automatic check_both();
    longint ref_s, ref_s4;
    @(posedge clk);
    ref_s  = (longint'(a)  + (longint'(1) << M)  - 1 + longint'(c_in)) % (longint'(1) << M);
    ref_s4 = (longint'(a4) + (longint'(1) << M4) - 1 + longint'(c_in)) % (longint'(1) << M4);
    checks++;
    if (longint'(s) !== ref_s) begin failures++; $display("FAIL a=%0h c=%0b got %0h", a, c_in, s); end
    checks++;
    if (longint'(s4) !== ref_s4) begin failures++; $display("FAIL4 a=%0h c=%0b got %0h", a4, c_in, s4); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      a4 = v[3:0]; c_in = v[4]; a = M'($urandom); check_both();
    end
    for (int c = 0; c < 2; c++) begin
      c_in = c[0];
      a = '0; a4 = '0; check_both();
      a = '1; a4 = '1; check_both();
      for (int k = 0; k < M; k++) begin
        a = M'(1) << k; check_both();
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a = M'($urandom); a4 = M4'($urandom); c_in = 1'($urandom); check_both();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
