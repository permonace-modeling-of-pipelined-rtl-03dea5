// Shared width rules for the pipelined linear-algebra engines.
//
// All engines work on unsigned integers and keep results at full precision:
// a product of two DW-bit operands needs 2*DW bits, and a sum of TERMS such
// products needs clog2(TERMS) more. The functions below give those widths so
// that every module sizes its accumulators the same way.
package linalg_pkg;

  // Width of a sum of `terms` products of two `dw`-bit unsigned operands.
  function automatic int unsigned sum_width(int unsigned dw, int unsigned terms);
    return 2 * dw + ((terms > 1) ? $clog2(terms) : 0);
  endfunction

  // Width of an index that counts 0 .. n-1 (at least one bit).
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
