// tb_rd4a: exhaustive self-check of the conventional 2-bit radix-4 element.
// All 32 combinations of a, b and cin are applied, one per clock, and
// {cout, sum} is compared with the integer sum a + b + cin.
module tb_rd4a;
  logic       clk;
  initial clk = 1'b0;
  logic [1:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  rd4a dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, a, b} = 5'(v);
      @(posedge clk);
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
