// bk_acra_top: the reconfigurable hybrid adder and its smoothing application.
//
// Three independent units side by side, each with its own ports:
//   - the accuracy-configurable hybrid adder (ACRA elements in the least
//     significant part, Brent-Kung adder in the most significant part),
//     switched between exact and approximate sums by sapp;
//   - the same hybrid adder with conventional RD4A elements in the least
//     significant part, the variant for users that only need exact sums;
//   - the 3x3 image smoothing unit, whose additions all use the
//     configurable hybrid adder and follow smooth_sapp.
// Everything is combinational: outputs follow the inputs after the adder
// delay, with no clock and no latency in cycles.
module bk_acra_top
  import acra_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned LSP_ELEMS = 1,
  parameter int unsigned PIX_W     = 8,
  parameter int unsigned OUT_W     = 16
) (
  // configurable hybrid adder
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             sapp,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  // exact-only hybrid adder (RD4A least significant part)
  input  logic [WIDTH-1:0] x_a,
  input  logic [WIDTH-1:0] x_b,
  input  logic             x_cin,
  output logic [WIDTH-1:0] x_sum,
  output logic             x_cout,
  // image smoothing unit
  input  logic [PIX_W-1:0] pix    [9],
  input  logic             smooth_sapp,
  output logic [OUT_W-1:0] smooth [9]
);

  bk_acra_adder #(
    .WIDTH     (WIDTH),
    .LSP_ELEMS (LSP_ELEMS),
    .LSP_KIND  (LSP_ACRA)
  ) u_acra_bk (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sapp (sapp),
    .sum  (sum),
    .cout (cout)
  );

  bk_acra_adder #(
    .WIDTH     (WIDTH),
    .LSP_ELEMS (LSP_ELEMS),
    .LSP_KIND  (LSP_RD4A)
  ) u_rd4a_bk (
    .a    (x_a),
    .b    (x_b),
    .cin  (x_cin),
    .sapp (1'b0),
    .sum  (x_sum),
    .cout (x_cout)
  );

  img_smoothing #(
    .PIX_W (PIX_W),
    .OUT_W (OUT_W)
  ) u_smooth (
    .p    (pix),
    .sapp (smooth_sapp),
    .op   (smooth)
  );

endmodule
