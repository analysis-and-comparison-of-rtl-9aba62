// two_min -- combinational circuit that finds the two smallest of N data items.
//
// The N items arrive as one N*M-bit vector (item k in bits k*M +: M). A first
// comparator network of log2(N) levels and N-1 comparators carries the smallest item,
// min_1st, to line N-1. That line is then overwritten with a copy of line N-2, which
// removes min_1st from the set while keeping the other N-1 items, and a second network
// finds the smallest of what is left, min_2nd. In its first level lines N-2 and N-1
// hold the same value, so that comparator is left out: 2N-3 comparators in all, in
// 2*log2(N) comparator delays. If the smallest value occurs twice, min_2nd equals
// min_1st.
//
// Interface: in_data in, min_1st / min_2nd out, no clock: the results follow the input
// after the propagation delay of the two networks, so a new data set can be applied
// every such period. The structure follows the network definition; the unsigned item
// comparison is this implementation's choice.
module two_min #(
  parameter int unsigned N = 256,  // number of data items, a power of two >= 2
  parameter int unsigned M = 32    // data item width in bits
) (
  input  logic [N-1:0][M-1:0] in_data,
  output logic [M-1:0]        min_1st,  // smallest item
  output logic [M-1:0]        min_2nd   // second smallest item
);

  logic [N-1:0][M-1:0] net1_out;  // first network output
  logic [N-1:0][M-1:0] net2_in;   // net1_out with min_1st replaced by line N-2
  logic [N-1:0][M-1:0] net2_out;

  min_network #(.N(N), .M(M), .OMIT_LAST_L0(1'b0)) u_net1 (
    .d_i(in_data),
    .d_o(net1_out)
  );

  always_comb begin
    net2_in        = net1_out;
    net2_in[N-1]   = net1_out[N-2];
  end

  min_network #(.N(N), .M(M), .OMIT_LAST_L0(1'b1)) u_net2 (
    .d_i(net2_in),
    .d_o(net2_out)
  );

  assign min_1st = net1_out[N-1];
  assign min_2nd = net2_out[N-1];

endmodule
