// bk_adder: Brent-Kung parallel prefix adder with carry-in.
//
// Three stages, as in any parallel prefix adder:
//   1. pre-processing: per bit, generate g = a & b and propagate p = a ^ b;
//   2. carry graph: a Brent-Kung prefix tree of black cells (group G and P)
//      and grey cells (group G only) that produces the carry into every bit;
//   3. post-processing: sum bit i = p(i) ^ carry into bit i.
// The carry-in joins the tree as an extra lowest position with g = cin and
// p = 0, so the tree works on WIDTH+1 positions. The tree is the usual
// Brent-Kung shape: an up-sweep that builds group terms over 2, 4, 8 ...
// positions at every 2^k-th position, then a down-sweep that fills in the
// remaining carries. Cells whose lower input already reaches down to the
// carry-in need only the generate term and are grey; the others are black.
// Logic depth is about 2*log2(WIDTH+1) cells with low fan-out.
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Purely combinational. WIDTH defaults to 6, the upper part of the 8-bit
// hybrid adder that uses it.
module bk_adder
  import acra_pkg::*;
#(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned M = WIDTH + 1;   // tree positions, carry-in at 0

  pg_t             pre  [WIDTH];   // pre-processing outputs
  pg_t             node [M];       // carry graph, updated level by level
  logic [WIDTH:0]  carry;          // carry(i) = carry into operand bit i

  // Stage 1: pre-processing
  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      pre[i].g = a[i] & b[i];
      pre[i].p = a[i] ^ b[i];
    end
  end

  // Stage 2: carry graph
  always_comb begin
    node[0].g = cin;
    node[0].p = 1'b0;
    for (int unsigned i = 0; i < WIDTH; i++) node[i+1] = pre[i];

    // up-sweep: at level l combine position i with position i - 2^l
    for (int unsigned l = 0; (2 << l) <= M; l++) begin
      for (int unsigned i = 0; i < M; i++) begin
        if (((i + 1) % (2 << l)) == 0) begin
          if ((i + 1) == (2 << l))
            node[i] = grey_cell(node[i], node[i - (1 << l)].g);
          else
            node[i] = black_cell(node[i], node[i - (1 << l)]);
        end
      end
    end

    // down-sweep: positions (2k+1)*2^l - 1 with k >= 1 take the full prefix
    // just below their group
    for (int l = $clog2(M) - 1; l >= 0; l--) begin
      for (int unsigned i = 0; i < M; i++) begin
        if ((((i + 1) % (2 << l)) == (1 << l)) && (i >= (2 << l)))
          node[i] = grey_cell(node[i], node[i - (1 << l)].g);
      end
    end

    for (int unsigned i = 0; i < M; i++) carry[i] = node[i].g;
  end

  // Stage 3: post-processing
  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) sum[i] = pre[i].p ^ carry[i];
    cout = carry[WIDTH];
  end

endmodule
