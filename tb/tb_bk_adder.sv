// tb_bk_adder: self-check of the Brent-Kung adder.
// The default 6-bit adder is checked exhaustively (all a, b, cin). Widths
// 1, 7, 8, 13 and 32 are checked with random operands plus all-ones
// operands (longest carry path), against the integer sum.
module tb_bk_adder;
  logic clk;
  initial clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [5:0]  a6, b6, s6;    logic c6, co6;
  logic [0:0]  a1, b1, s1;    logic c1, co1;
  logic [6:0]  a7, b7, s7;    logic c7, co7;
  logic [7:0]  a8, b8, s8;    logic c8, co8;
  logic [12:0] a13, b13, s13; logic c13, co13;
  logic [31:0] a32, b32, s32; logic c32, co32;

  bk_adder                dut6  (.a(a6),  .b(b6),  .cin(c6),  .sum(s6),  .cout(co6));
  bk_adder #(.WIDTH(1))  dut1  (.a(a1),  .b(b1),  .cin(c1),  .sum(s1),  .cout(co1));
  bk_adder #(.WIDTH(7))  dut7  (.a(a7),  .b(b7),  .cin(c7),  .sum(s7),  .cout(co7));
  bk_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  bk_adder #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));
  bk_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(co32));

  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", name, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      {c6, a6, b6} = 13'(v);
      #1;
      check("w6", longint'({co6, s6}), longint'(a6) + longint'(b6) + longint'(c6));
    end
    for (int t = 0; t < 3000; t++) begin
      if (t < 2) begin
        a1 = '1; b1 = '1; a7 = '1; b7 = '0; a8 = '1; b8 = '0; a13 = '1; b13 = '0;
        a32 = '1; b32 = '0; {c1, c7, c8, c13, c32} = '1;
        if (t == 1) begin b7 = '1; b8 = '1; b13 = '1; b32 = '1; end
      end else begin
        a1 = 1'($urandom); b1 = 1'($urandom); c1 = 1'($urandom);
        a7 = 7'($urandom); b7 = 7'($urandom); c7 = 1'($urandom);
        a8 = 8'($urandom); b8 = 8'($urandom); c8 = 1'($urandom);
        a13 = 13'($urandom); b13 = 13'($urandom); c13 = 1'($urandom);
        a32 = $urandom; b32 = $urandom; c32 = 1'($urandom);
      end
      @(posedge clk);
      check("w1",  longint'({co1, s1}),   longint'(a1) + longint'(b1) + longint'(c1));
      check("w7",  longint'({co7, s7}),   longint'(a7) + longint'(b7) + longint'(c7));
      check("w8",  longint'({co8, s8}),   longint'(a8) + longint'(b8) + longint'(c8));
      check("w13", longint'({co13, s13}), longint'(a13) + longint'(b13) + longint'(c13));
      check("w32", longint'({co32, s32}), longint'(a32) + longint'(b32) + longint'(c32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
