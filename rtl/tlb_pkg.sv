// tlb_pkg: types and constants shared by the TLB modules.
//
// The TLB can be built with either of the two replacement policies the
// study compares: random replacement and least recently used (LRU)
// replacement. repl_e selects between them at elaboration time.
// The helper function idx_w gives the width of an index into N things and
// never returns zero, so that a one-entry or one-bank build still has a
// legal (one-bit) index signal.
package tlb_pkg;

  typedef enum logic {
    REPL_RANDOM = 1'b0,
    REPL_LRU    = 1'b1
  } repl_e;

  function automatic int idx_w(input int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
