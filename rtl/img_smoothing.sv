// img_smoothing: 3x3 neighbourhood-sum smoothing unit built from the
// reconfigurable hybrid adder.
//
// Takes a 3x3 tile of pixels p[0..8] (row-major, p[0] top left) and, for
// every pixel, adds up the pixel and its horizontal, vertical and diagonal
// neighbours that lie inside the tile (4 terms at a corner, 6 at an edge,
// 9 in the centre). All additions use bk_acra_adder, so the single mode
// input sapp switches the whole unit between exact and approximate sums.
// For pixel k the sum starts from p[k] and adds the neighbours in raster
// order, one adder per neighbour, so the order of the additions is fixed;
// this matters in approximate mode, where the adder is not associative.
// The outputs are neighbourhood sums, not yet divided by the number of
// terms; the divisor of each output is 4, 6 or 9 and is left to the
// consumer. With 8-bit pixels the largest sum is 9 * 255 = 2295, so the
// top four bits of each 16-bit output stay 0; OUT_W leaves that headroom.
// The interface (nine pixel inputs, nine wider outputs, one sapp input)
// follows the published smoothing simulation; the neighbourhood sum itself,
// the tile boundary rule and the widths are this design's choices.
// Interface: p[9] (PIX_W bits each), sapp -> op[9] (OUT_W bits each).
// Purely combinational.
module img_smoothing #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned OUT_W = 16
) (
  input  logic [PIX_W-1:0] p  [9],
  input  logic             sapp,
  output logic [OUT_W-1:0] op [9]
);

  for (genvar k = 0; k < 9; k++) begin : g_pix
    localparam int R = k / 3;
    localparam int C = k % 3;

    logic [OUT_W-1:0] acc [9];   // acc[j]: running sum after neighbour j
    assign acc[0] = OUT_W'(p[k]);

    // neighbours j = 1..8 in raster order of the offsets, skipping (0,0)
    for (genvar j = 1; j < 9; j++) begin : g_nb
      localparam int J  = (j <= 4) ? j - 1 : j;   // 0..8 without 4
      localparam int NR = R + J / 3 - 1;
      localparam int NC = C + J % 3 - 1;
      if (NR >= 0 && NR < 3 && NC >= 0 && NC < 3) begin : g_add
        logic unused_cout;
        bk_acra_adder #(.WIDTH(OUT_W)) u_add (
          .a    (acc[j-1]),
          .b    (OUT_W'(p[NR*3 + NC])),
          .cin  (1'b0),
          .sapp (sapp),
          .sum  (acc[j]),
          .cout (unused_cout)
        );
      end else begin : g_skip
        assign acc[j] = acc[j-1];
      end
    end

    assign op[k] = acc[8];
  end

endmodule
