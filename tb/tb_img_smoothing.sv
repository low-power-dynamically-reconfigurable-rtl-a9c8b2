// tb_img_smoothing: self-check of the 3x3 smoothing unit.
// Tiles: the published test tile (pixels 10, 20, ..., 90 in raster order),
// an all-255 tile and random tiles, each in exact (sapp = 0) and
// approximate (sapp = 1) mode. Exact outputs are compared with the plain
// neighbourhood sum; approximate outputs with the same sum built from the
// arithmetic adder model, in the unit's documented order (the pixel itself,
// then its neighbours in raster order).
module tb_img_smoothing;
  localparam int PIX_W = 8;
  localparam int OUT_W = 16;

  logic             clk;
  initial clk = 1'b0;
  logic [PIX_W-1:0] p  [9];
  logic [OUT_W-1:0] op [9];
  logic             sapp;
  int               checks = 0, failures = 0, approx_diff = 0;

  always #5 clk = ~clk;

  img_smoothing dut (.p(p), .sapp(sapp), .op(op));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_tile();
    for (int k = 0; k < 9; k++) begin
      longint exact = 0;
      longint acc = longint'(p[k]);
      for (int j = 0; j < 9; j++) begin
        int nr = k / 3 + j / 3 - 1;
        int nc = k % 3 + j % 3 - 1;
        if (nr >= 0 && nr < 3 && nc >= 0 && nc < 3) begin
          exact += longint'(p[nr*3 + nc]);
          if (j != 4)
            acc = acra_model_pkg::model_add(acc, longint'(p[nr*3 + nc]), 1'b0, sapp,
                                            OUT_W, 1) & 'hFFFF;
        end
      end
      checks++;
      if (longint'(op[k]) != (sapp ? acc : exact)) begin
        failures++;
        $display("FAIL sapp=%0b op[%0d]=%0d expected %0d", sapp, k, op[k],
                 sapp ? acc : exact);
      end
      if (sapp && longint'(op[k]) != exact) approx_diff++;
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      sapp = 1'(m);
      for (int k = 0; k < 9; k++) p[k] = PIX_W'(10 * (k + 1));
      @(posedge clk);
      check_tile();
      if (!sapp) begin
        // exact centre sum of the published tile: 10 + 20 + ... + 90
        checks++;
        if (op[4] != 16'd450) begin
          failures++;
          $display("FAIL centre sum %0d", op[4]);
        end
      end
      for (int k = 0; k < 9; k++) p[k] = '1;
      @(posedge clk);
      check_tile();
      for (int t = 0; t < 500; t++) begin
        for (int k = 0; k < 9; k++) p[k] = PIX_W'($urandom);
        @(posedge clk);
        check_tile();
      end
    end
    checks++;
    if (approx_diff == 0) begin
      failures++;
      $display("FAIL approximate mode never changed an output");
    end
    $display("approximate outputs differing from exact: %0d", approx_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
