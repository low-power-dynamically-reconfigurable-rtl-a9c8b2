// acra_model_pkg: arithmetic reference model of the hybrid adder, for the
// testbenches. It does not use the RTL's gate equations; it works on whole
// numbers. Each 2-bit element of the least significant part either adds
// exactly (accurate mode) or follows the approximate rule (carry-out = carry
// of a + b alone, bit 1 = bit 1 of a + b, bit 0 = carry-in). The upper part
// adds its operand bits plus the lower part's carry, which approximate mode
// drops. model_add returns {cout, sum} in its low w+1 bits.
package acra_model_pkg;

  function automatic longint model_add(longint a, longint b, bit cin, bit sapp,
                                       int w, int elems);
    longint res = 0;
    longint c = cin;
    longint hi;
    longint mask = (longint'(1) << w) - 1;
    a &= mask;
    b &= mask;
    for (int e = 0; e < elems; e++) begin
      longint ea = (a >> (2*e)) & 3;
      longint eb = (b >> (2*e)) & 3;
      longint t;
      if (!sapp) begin
        t = ea + eb + c;
        res |= (t & 3) << (2*e);
        c = t >> 2;
      end else begin
        t = ea + eb;
        res |= ((t & 2) | c) << (2*e);
        c = (t >= 4) ? 1 : 0;
      end
    end
    if (sapp) c = 0;
    hi = (a >> (2*elems)) + (b >> (2*elems)) + c;
    return res | (hi << (2*elems));
  endfunction

endpackage
