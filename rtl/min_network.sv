// min_network -- comparator network that moves the smallest of N items to line N-1.
//
// L = log2(N) levels of cmp_level are cascaded. In level i the comparators join lines
// 2**i apart, so after level i each line (k+1) that is a multiple of 2**(i+1) holds the
// minimum of the 2**(i+1) lines ending there; after the last level line N-1 holds the
// minimum of all N items. The whole permuted data set is output, not only the
// minimum, because the min_2nd step works on it. The network has N-1 comparators
// (N-2 with OMIT_LAST_L0).
//
// OMIT_LAST_L0 drops the level-0 comparator on lines N-2 / N-1 (see cmp_level).
//
// Purely combinational, depth L comparators.
module min_network
  import two_min_pkg::*;
#(
  parameter int unsigned N            = 256,  // number of items, a power of two >= 2
  parameter int unsigned M            = 32,   // item width in bits
  parameter bit          OMIT_LAST_L0 = 1'b0  // drop the level-0 comparator on N-2 / N-1
) (
  input  logic [N-1:0][M-1:0] d_i,  // line k holds item k
  output logic [N-1:0][M-1:0] d_o   // permuted items; d_o[N-1] is the smallest
);

  localparam int unsigned L = net_levels(N);

  // stage[0] is the network input, stage[i+1] the output of level i
  logic [N-1:0][M-1:0] stage [L+1];

  assign stage[0] = d_i;

  for (genvar i = 0; i < L; i++) begin : g_level
    cmp_level #(
      .N        (N),
      .M        (M),
      .LEVEL    (i),
      .OMIT_LAST(i == 0 ? OMIT_LAST_L0 : 1'b0)
    ) u_level (
      .d_i(stage[i]),
      .d_o(stage[i+1])
    );
  end

  assign d_o = stage[L];

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $fatal(1, "min_network: N=%0d must be a power of two >= 2", N);
  end

endmodule
