// two_min_pkg -- shared index arithmetic of the two-smallest-values comparator network.
//
// The network works on N = 2**L data lines numbered 0 (top) to N-1 (bottom). Level i
// (i = 0 .. L-1) holds N / 2**(i+1) comparators; comparator j of level i joins the
// "upper" line 2**i - 1 + j*2**(i+1) with the "lower" line 2**i further down. After
// the L levels the smallest item sits on line N-1. This line assignment is the one
// the network is defined by; the helper names and the split into functions are this
// implementation's own.
//
// All functions are constant functions, usable in parameter and generate expressions.
package two_min_pkg;

  // Number of levels of an N-line network (N a power of two, N >= 2).
  function automatic int unsigned net_levels(input int unsigned n);
    return $clog2(n);
  endfunction

  // Number of comparators in level i of an N-line network.
  function automatic int unsigned level_cmps(input int unsigned n, input int unsigned i);
    return n >> (i + 1);
  endfunction

  // Upper (input-1) line of comparator j in level i.
  function automatic int unsigned upper_line(input int unsigned i, input int unsigned j);
    return (32'd1 << i) - 1 + j * (32'd1 << (i + 1));
  endfunction

  // Lower (input-2) line of comparator j in level i.
  function automatic int unsigned lower_line(input int unsigned i, input int unsigned j);
    return upper_line(i, j) + (32'd1 << i);
  endfunction

  // Comparators of the complete two-minimum circuit: N-1 for min_1st, N-2 for min_2nd.
  function automatic int unsigned total_cmps(input int unsigned n);
    return 2 * n - 3;
  endfunction

endpackage
