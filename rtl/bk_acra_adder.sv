// bk_acra_adder: dynamically reconfigurable hybrid adder.
//
// The operands are split into a least significant part (LSP) of 2*LSP_ELEMS
// bits and a most significant part (MSP) of the remaining bits.
//   - The LSP is a chain of 2-bit radix-4 elements. With LSP_KIND = LSP_ACRA
//     they are accuracy-configurable elements (acra_cell) controlled by sapp;
//     with LSP_KIND = LSP_RD4A they are conventional elements (rd4a) and the
//     adder is always accurate.
//   - The MSP is a Brent-Kung parallel prefix adder (bk_adder).
// Carry c1 leaves the LSP; c2 enters the MSP. In accurate mode (sapp = 0)
// c2 = c1 and the adder returns the exact sum. In approximate mode
// (sapp = 1) the LSP elements drop their carry-in logic and c2 is held at 0,
// so the MSP adds its own operand bits only; the result is then low by at
// most 2^(2*LSP_ELEMS) plus the LSP's own error. Holding c2 low in
// approximate mode is this design's reading of the published 8-bit
// simulation, where a = 8'b00110011, b = 8'b10001111, cin = 0, sapp = 1
// gives sum = 8'b10111110 with c1 = 1 and c2 = 0.
// Defaults (8 bits, one LSP element, 6-bit MSP) follow that simulation.
// Interface: a, b (WIDTH bits), cin, sapp -> sum (WIDTH bits), cout.
// Purely combinational.
module bk_acra_adder
  import acra_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned LSP_ELEMS = 1,
  parameter lsp_kind_e   LSP_KIND  = LSP_ACRA
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             sapp,   // 0: accurate, 1: approximate
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LSP_W = 2 * LSP_ELEMS;
  localparam int unsigned MSP_W = WIDTH - LSP_W;

  logic [LSP_ELEMS:0] lc;   // carries between LSP elements
  logic               c1;   // carry out of the LSP
  logic               c2;   // carry into the MSP

  assign lc[0] = cin;

  for (genvar e = 0; e < LSP_ELEMS; e++) begin : g_lsp
    if (LSP_KIND == LSP_ACRA) begin : g_acra
      acra_cell u_elem (
        .a    (a[2*e +: 2]),
        .b    (b[2*e +: 2]),
        .cin  (lc[e]),
        .sapp (sapp),
        .sum  (sum[2*e +: 2]),
        .cout (lc[e+1])
      );
    end else begin : g_rd4a
      rd4a u_elem (
        .a    (a[2*e +: 2]),
        .b    (b[2*e +: 2]),
        .cin  (lc[e]),
        .sum  (sum[2*e +: 2]),
        .cout (lc[e+1])
      );
    end
  end

  assign c1 = lc[LSP_ELEMS];
  assign c2 = (LSP_KIND == LSP_ACRA) ? (c1 & ~sapp) : c1;

  bk_adder #(.WIDTH(MSP_W)) u_msp (
    .a    (a[WIDTH-1:LSP_W]),
    .b    (b[WIDTH-1:LSP_W]),
    .cin  (c2),
    .sum  (sum[WIDTH-1:LSP_W]),
    .cout (cout)
  );

  // Accurate mode must return the exact sum.
  always_comb begin
    if (!sapp || LSP_KIND == LSP_RD4A)
      assert final ({cout, sum} == {1'b0, a} + {1'b0, b} + (WIDTH+1)'(cin))
        else $error("bk_acra_adder: accurate-mode sum mismatch");
  end

  initial begin
    assert (WIDTH > LSP_W) else $fatal(1, "bk_acra_adder: WIDTH must exceed 2*LSP_ELEMS");
  end

endmodule
