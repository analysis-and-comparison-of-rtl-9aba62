// two_min_top -- the three forms of the two-smallest-values circuit on one input bus.
//
// All three find min_1st and min_2nd, the smallest and second smallest of N unsigned
// M-bit items given as one N*M-bit vector (item k in bits k*M +: M):
//   comb_* - two_min, the combinational 2N-3 comparator circuit; results follow in_data
//            after its propagation delay, no clock involved.
//   pipe_* - two_min_pipe, the same network with a register after every comparator
//            level; in_valid offers a data set every cycle, results come 2*log2(N)
//            cycles later with pipe_valid.
//   seq_*  - two_min_seq, one N-1 comparator network used twice; seq_start (taken
//            while seq_busy is low) starts a data set, seq_done pulses two cycles later.
// The engines share in_data but are otherwise independent, so each can be used, timed
// and changed alone; the combinational one is the main form, the other two are the
// pipelined and the comparator-sharing variants. Placing them side by side, the shared
// input bus and the port names are this implementation's choices.
//
// Clock clk_i, reset rst_ni (asynchronous, active low) for the two clocked engines.
module two_min_top #(
  parameter int unsigned N = 256,  // number of data items, a power of two >= 2
  parameter int unsigned M = 32    // data item width in bits
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic [N-1:0][M-1:0] in_data,
  // combinational engine
  output logic [M-1:0]        comb_min_1st,
  output logic [M-1:0]        comb_min_2nd,
  // pipelined engine
  input  logic                in_valid,
  output logic                pipe_valid,
  output logic [M-1:0]        pipe_min_1st,
  output logic [M-1:0]        pipe_min_2nd,
  // two-step sequential engine
  input  logic                seq_start,
  output logic                seq_busy,
  output logic                seq_done,
  output logic [M-1:0]        seq_min_1st,
  output logic [M-1:0]        seq_min_2nd
);

  two_min #(.N(N), .M(M)) u_comb (
    .in_data(in_data),
    .min_1st(comb_min_1st),
    .min_2nd(comb_min_2nd)
  );

  two_min_pipe #(.N(N), .M(M)) u_pipe (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .in_valid (in_valid),
    .in_data  (in_data),
    .out_valid(pipe_valid),
    .min_1st  (pipe_min_1st),
    .min_2nd  (pipe_min_2nd)
  );

  two_min_seq #(.N(N), .M(M)) u_seq (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .start  (seq_start),
    .in_data(in_data),
    .busy   (seq_busy),
    .done   (seq_done),
    .min_1st(seq_min_1st),
    .min_2nd(seq_min_2nd)
  );

endmodule
