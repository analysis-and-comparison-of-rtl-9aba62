// cmp_level -- one level of the comparator network, all comparators in parallel.
//
// Level LEVEL of an N-line network holds N / 2**(LEVEL+1) comparators. Comparator j
// takes the upper line 2**LEVEL - 1 + j*2**(LEVEL+1) and the lower line 2**LEVEL
// further down (see two_min_pkg); every other line passes straight through. Because
// the comparators of a level touch disjoint lines they all work at once.
//
// OMIT_LAST removes the last comparator of the level, the one on lines N-2 and N-1.
// The min_2nd network uses this in its first level, where those two lines carry the
// same value and a comparator there would do nothing (this is how the second network
// gets by with N-2 comparators).
//
// Purely combinational: d_o follows d_i after the delay of one comparator.
module cmp_level
  import two_min_pkg::*;
#(
  parameter int unsigned N         = 256,  // number of data lines, a power of two
  parameter int unsigned M         = 32,   // data item width in bits
  parameter int unsigned LEVEL     = 0,    // level index, 0 .. log2(N)-1
  parameter bit          OMIT_LAST = 1'b0  // drop the comparator on lines N-2 / N-1
) (
  input  logic [N-1:0][M-1:0] d_i,  // line k holds item k
  output logic [N-1:0][M-1:0] d_o
);

  localparam int unsigned STEP  = 1 << LEVEL;
  localparam int unsigned NCMP  = level_cmps(N, LEVEL);
  localparam int unsigned NUSED = OMIT_LAST ? NCMP - 1 : NCMP;

  // Lines not touched by a comparator: those with (k+1) mod 2**LEVEL != 0, plus the
  // last comparator's two lines when it is omitted.
  for (genvar k = 0; k < N; k++) begin : g_line
    localparam bit IS_UPPER = ((k + 1) % (2 * STEP)) == STEP;
    localparam bit IS_LOWER = ((k + 1) % (2 * STEP)) == 0;
    localparam int unsigned J = k / (2 * STEP);
    if (!(IS_UPPER || IS_LOWER) || J >= NUSED) begin : g_pass
      assign d_o[k] = d_i[k];
    end
  end

  for (genvar j = 0; j < NUSED; j++) begin : g_cmp
    cmp_swap #(.M(M)) u_cmp (
      .a_i (d_i[upper_line(LEVEL, j)]),
      .b_i (d_i[lower_line(LEVEL, j)]),
      .hi_o(d_o[upper_line(LEVEL, j)]),
      .lo_o(d_o[lower_line(LEVEL, j)])
    );
  end

endmodule
