// acra_cell: 2-bit accuracy-configurable radix-4 adder element (ACRA).
//
// A radix-4 element whose carry-in logic can be switched off by the mode
// input sapp. With sapp = 0 it computes exactly what the conventional RD4A
// element computes. With sapp = 1 the element works in approximate mode:
//   - the gates that combine the carry-in with the operand OR terms (G1, G2)
//     are disabled, so cout = a1 b1 + (a0 b0)(a1 + b1): the generate of the
//     element only;
//   - the gates that AND the carry-in with a0 and b0 (G5, G6) are power
//     gated and their outputs held low, so the carry into bit 1 is a0 b0 and
//     sum1 = (a1 ^ b1) ^ (a0 b0);
//   - the gate forming a0 ^ b0 (G7) is power gated and its output held low,
//     so sum0 = cin: this is the modified partial sum.
// The power switches themselves are transistors; here only their logical
// effect is modelled, as the held level of each gated node.
// The choice that the gated nodes are held low (rather than high) is this
// design's reading of the gated element; it gives sum = 2'b10, cout = 1 for
// a = b = 2'b11, cin = 0 in approximate mode, which is the published
// simulation result for that element.
// Interface: a, b (2 bits), cin, sapp -> sum (2 bits), cout. Combinational.
module acra_cell (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  input  logic       sapp,   // 0: accurate mode, 1: approximate mode
  output logic [1:0] sum,
  output logic       cout
);

  logic and1, nor1, and0, nor0;
  logic x1;
  logic g1, g2;        // carry-in path of cout (gated by sapp)
  logic g5, g6;        // cin & a0, cin & b0 (power gated in approximate mode)
  logic g7;            // a0 ^ b0 (power gated in approximate mode)
  logic c1;            // carry into bit 1

  always_comb begin
    and1 = a[1] & b[1];
    nor1 = ~(a[1] | b[1]);
    and0 = a[0] & b[0];
    nor0 = ~(a[0] | b[0]);
    x1   = ~(and1 | nor1);
    // G1: (a1 + b1)(a0 + b0), forced low when sapp = 1
    g1   = ~(nor1 | nor0 | sapp);
    // G2: carry-in term of cout
    g2   = g1 & cin;
    // G5, G6 and G7 lose their supply in approximate mode: output held low
    g5   = sapp ? 1'b0 : (cin & a[0]);
    g6   = sapp ? 1'b0 : (cin & b[0]);
    g7   = sapp ? 1'b0 : ~(and0 | nor0);
    c1   = and0 | g5 | g6;
    sum[1] = x1 ^ c1;
    sum[0] = g7 ^ cin;
    cout   = and1 | (and0 & ~nor1) | g2;
  end

endmodule
