// tb_acra_cell: exhaustive self-check of the accuracy-configurable element.
// Accurate mode (sapp = 0): {cout, sum} must equal a + b + cin.
// Approximate mode (sapp = 1), worked out arithmetically:
//   cout = (a + b) >= 4     (carry-in no longer reaches the carry-out)
//   sum1 = bit 1 of a + b   (carry into bit 1 is a0 & b0 only)
//   sum0 = cin              (the modified partial sum)
// Also checks the published point a = b = 2'b11, cin = 0, sapp = 1 ->
// sum = 2'b10, cout = 1.
module tb_acra_cell;
  logic       clk;
  initial clk = 1'b0;
  logic [1:0] a, b, sum;
  logic       cin, sapp, cout;
  int         checks = 0, failures = 0;
  int         s_ab;
  logic [2:0] exp_v;

  always #5 clk = ~clk;

  acra_cell dut (.a(a), .b(b), .cin(cin), .sapp(sapp), .sum(sum), .cout(cout));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {sapp, cin, a, b} = 6'(v);
      @(posedge clk);
      s_ab = int'(a) + int'(b);
      if (!sapp) exp_v = 3'(s_ab + int'(cin));
      else       exp_v = {s_ab >= 4, 1'((s_ab >> 1) & 1), cin};
      checks++;
      if ({cout, sum} != exp_v) begin
        failures++;
        $display("FAIL sapp=%0b a=%0d b=%0d cin=%0d -> %b expected %b",
                 sapp, a, b, cin, {cout, sum}, exp_v);
      end
    end
    a = 2'b11; b = 2'b11; cin = 1'b0; sapp = 1'b1;
    @(posedge clk);
    checks++;
    if (sum != 2'b10 || cout != 1'b1) begin
      failures++;
      $display("FAIL published point: sum=%b cout=%b", sum, cout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
