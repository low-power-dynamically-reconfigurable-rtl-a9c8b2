// tb_bk_acra_adder: self-check of the reconfigurable hybrid adder.
// The expected result comes from the arithmetic model in acra_model_pkg.
// Checked:
//   - the default 8-bit adder, exhaustively, in both modes;
//   - the published point a = 8'b00110011, b = 8'b10001111, cin = 0:
//     exact 8'b11000010, approximate 8'b10111110 with cout = 0;
//   - the 8-bit variant with an RD4A least significant part, which must be
//     exact whatever sapp is;
//   - a 16-bit adder with two elements in the least significant part, at
//     random, in both modes.
// It also counts how often approximate mode actually changed a result.
module tb_bk_acra_adder
  import acra_pkg::*;
;
  logic clk;
  initial clk = 1'b0;
  int   checks = 0, failures = 0, approx_diff = 0;

  always #5 clk = ~clk;

  logic [7:0]  a8, b8, s8, r8;     logic ci8, sa8, co8, rco8;
  logic [15:0] a16, b16, s16;      logic ci16, sa16, co16;

  bk_acra_adder dut8 (.a(a8), .b(b8), .cin(ci8), .sapp(sa8), .sum(s8), .cout(co8));
  bk_acra_adder #(.LSP_KIND(LSP_RD4A)) dut8x (
    .a(a8), .b(b8), .cin(ci8), .sapp(sa8), .sum(r8), .cout(rco8));
  bk_acra_adder #(.WIDTH(16), .LSP_ELEMS(2)) dut16 (
    .a(a16), .b(b16), .cin(ci16), .sapp(sa16), .sum(s16), .cout(co16));


  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", name, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; ci16 = 1'b0; sa16 = 1'b0;
    for (int v = 0; v < (1 << 18); v++) begin
      {sa8, ci8, a8, b8} = 18'(v);
      #1;
      check("w8", longint'({co8, s8}), acra_model_pkg::model_add(longint'(a8), longint'(b8), ci8, sa8, 8, 1));
      check("w8 rd4a", longint'({rco8, r8}), longint'(a8) + longint'(b8) + longint'(ci8));
      if (sa8 && {co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci8))) approx_diff++;
    end
    // published point
    a8 = 8'b00110011; b8 = 8'b10001111; ci8 = 1'b0; sa8 = 1'b0;
    #1 check("published exact", longint'({co8, s8}), longint'(9'b0_11000010));
    sa8 = 1'b1;
    #1 check("published approx", longint'({co8, s8}), longint'(9'b0_10111110));
    check("published c1", longint'(dut8.c1), 1);
    check("published c2", longint'(dut8.c2), 0);
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom); sa16 = 1'($urandom);
      @(posedge clk);
      check("w16", longint'({co16, s16}),
            acra_model_pkg::model_add(longint'(a16), longint'(b16), ci16, sa16, 16, 2));
    end
    checks++;
    if (approx_diff == 0) begin
      failures++;
      $display("FAIL approximate mode never changed a result");
    end
    $display("approximate results differing from exact: %0d of %0d", approx_diff, 1 << 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
