// rd4a: conventional 2-bit radix-4 adder element.
//
// Adds two 2-bit operands and a carry-in in one flat level of logic: no sum
// bit waits for a rippled carry. The equations are the published RD4A ones:
//   cout  = a1 b1 + (a0 b0)(a1 + b1) + cin (a0 + b0)(a1 + b1)
//   sum1  = (a1 ^ b1) ^ (a0 b0 + cin a0 + cin b0)
//   sum0  = (a0 ^ b0) ^ cin
// Each XOR of two operand bits is formed from the AND and NOR terms that the
// carry logic already needs (x ^ y = ~(x y | ~(x | y))), so those gates are
// shared as in the conventional element.
// Interface: a, b (2 bits), cin -> sum (2 bits), cout. Purely combinational.
module rd4a (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] sum,
  output logic       cout
);

  logic and1, nor1, and0, nor0;   // shared AND / NOR of each operand bit pair
  logic x1, x0;                   // operand-bit XORs built from them
  logic c1;                       // carry into bit 1

  always_comb begin
    and1 = a[1] & b[1];
    nor1 = ~(a[1] | b[1]);
    and0 = a[0] & b[0];
    nor0 = ~(a[0] | b[0]);
    x1   = ~(and1 | nor1);
    x0   = ~(and0 | nor0);
    c1   = and0 | (cin & a[0]) | (cin & b[0]);
    sum[0] = x0 ^ cin;
    sum[1] = x1 ^ c1;
    // (a1 + b1) = ~nor1, (a0 + b0) = ~nor0
    cout = and1 | (and0 & ~nor1) | (cin & ~nor0 & ~nor1);
  end

endmodule
