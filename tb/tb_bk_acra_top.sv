// tb_bk_acra_top: end-to-end test of the top at its default sizes.
// Every cycle it drives new random operands into both hybrid adders and a
// new random tile into the smoothing unit, and switches the accuracy mode
// every few cycles. Results are compared with the arithmetic model
// (acra_model_pkg). It counts, and requires at least once each:
//   - exact additions and approximate additions on the configurable adder;
//   - mode switches (sapp changing between two cycles), both directions;
//   - a carry from the least significant part into the Brent-Kung part
//     (exact mode) and a carry dropped at that boundary (approximate mode);
//   - a carry-out of the whole adder (overflow);
//   - approximate results that differ from the exact sum;
//   - exact additions on the RD4A-based adder;
//   - smoothing tiles in each mode.
module tb_bk_acra_top;
  localparam int W     = 8;
  localparam int PIX_W = 8;
  localparam int OUT_W = 16;
  localparam int N     = 4000;

  logic clk;
  initial clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [W-1:0]     a, b, sum, x_a, x_b, x_sum;
  logic             cin, sapp, cout, x_cin, x_cout, smooth_sapp;
  logic [PIX_W-1:0] pix    [9];
  logic [OUT_W-1:0] smooth [9];

  int n_exact, n_approx, n_sw_up, n_sw_down, n_carry_pass, n_carry_cut;
  int n_overflow, n_approx_err, n_rd4a, n_smooth_exact, n_smooth_approx;

  always #5 clk = ~clk;

  bk_acra_top dut (
    .a(a), .b(b), .cin(cin), .sapp(sapp), .sum(sum), .cout(cout),
    .x_a(x_a), .x_b(x_b), .x_cin(x_cin), .x_sum(x_sum), .x_cout(x_cout),
    .pix(pix), .smooth_sapp(smooth_sapp), .smooth(smooth)
  );

  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", name, got, exp);
    end
  endtask

  task automatic require(string name, int count);
    checks++;
    $display("%-34s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_sapp;
    {n_exact, n_approx, n_sw_up, n_sw_down, n_carry_pass, n_carry_cut} = '0;
    {n_overflow, n_approx_err, n_rd4a, n_smooth_exact, n_smooth_approx} = '0;
    sapp = 1'b0;
    prev_sapp = 1'b0;
    for (int t = 0; t < N; t++) begin
      if (t % 7 == 6) sapp = ~sapp;
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      x_a = W'($urandom); x_b = W'($urandom); x_cin = 1'($urandom);
      smooth_sapp = 1'($urandom);
      for (int k = 0; k < 9; k++) pix[k] = PIX_W'($urandom);
      @(posedge clk);

      // configurable hybrid adder
      check("acra_bk", longint'({cout, sum}),
            acra_model_pkg::model_add(longint'(a), longint'(b), cin, sapp, W, 1));
      if (sapp) n_approx++; else n_exact++;
      if (sapp && !prev_sapp) n_sw_up++;
      if (!sapp && prev_sapp) n_sw_down++;
      prev_sapp = sapp;
      // carry out of the 2-bit least significant part, worked out directly:
      // a1a0 + b1b0 (+ cin in exact mode) reaches 4
      if ((int'(a[1:0]) + int'(b[1:0]) + (sapp ? 0 : int'(cin))) >= 4) begin
        if (sapp) n_carry_cut++; else n_carry_pass++;
      end
      if (cout) n_overflow++;
      if (sapp && {cout, sum} != (W+1)'(int'(a) + int'(b) + int'(cin))) n_approx_err++;

      // RD4A-based hybrid adder: always exact
      check("rd4a_bk", longint'({x_cout, x_sum}), longint'(x_a) + longint'(x_b) + longint'(x_cin));
      n_rd4a++;

      // smoothing unit
      for (int k = 0; k < 9; k++) begin
        longint acc;
        int     nr, nc;
        acc = longint'(pix[k]);
        for (int j = 0; j < 9; j++) begin
          nr = k / 3 + j / 3 - 1;
          nc = k % 3 + j % 3 - 1;
          if (j != 4 && nr >= 0 && nr < 3 && nc >= 0 && nc < 3)
            acc = acra_model_pkg::model_add(acc, longint'(pix[nr*3 + nc]), 1'b0,
                                            smooth_sapp, OUT_W, 1) & 'hFFFF;
        end
        check("smooth", longint'(smooth[k]), acc);
      end
      if (smooth_sapp) n_smooth_approx++; else n_smooth_exact++;
    end

    require("exact additions", n_exact);
    require("approximate additions", n_approx);
    require("switches to approximate mode", n_sw_up);
    require("switches to accurate mode", n_sw_down);
    require("LSP carries passed to the BK part", n_carry_pass);
    require("LSP carries cut (approximate)", n_carry_cut);
    require("carry-out of the whole adder", n_overflow);
    require("approximate results off exact", n_approx_err);
    require("RD4A-based exact additions", n_rd4a);
    require("smoothing tiles, exact", n_smooth_exact);
    require("smoothing tiles, approximate", n_smooth_approx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
