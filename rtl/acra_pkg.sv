// acra_pkg: types and prefix-cell functions shared by the hybrid adder.
//
// Brent-Kung prefix cells work on (generate, propagate) pairs. A black cell
// merges two pairs into a group pair: G = Gh | Ph & Gl, P = Ph & Pl. A grey
// cell only needs the group generate: G = Gh | Ph & Gl. These are the cell
// equations of the Brent-Kung carry graph. The LSP kind selects which 2-bit
// radix-4 element fills the least significant part of the hybrid adder: the
// accuracy-configurable element, or the conventional element when only
// accurate results are needed.
package acra_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  typedef enum logic {
    LSP_ACRA = 1'b0,
    LSP_RD4A = 1'b1
  } lsp_kind_e;

  // Black cell: group generate and group propagate.
  function automatic pg_t black_cell(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Grey cell: group generate only. Its lower input always reaches down to
  // the carry-in, so only that input's generate is needed and the result's
  // propagate is 0.
  function automatic pg_t grey_cell(pg_t hi, logic lo_g);
    pg_t r;
    r.g = hi.g | (hi.p & lo_g);
    r.p = 1'b0;
    return r;
  endfunction

endpackage
