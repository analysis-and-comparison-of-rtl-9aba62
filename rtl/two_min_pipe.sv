// two_min_pipe -- pipelined two-smallest-values circuit, one data set per clock.
//
// The same 2N-3 comparators as two_min, with a register after every comparator level:
// 2*L stages for L = log2(N). Stages 0 .. L-1 are the min_1st network. At the entry of
// stage L the bottom line (min_1st) is taken out into a side register that travels
// along with its data set, and line N-1 is overwritten with line N-2; stages L .. 2L-1
// are the min_2nd network (its first level without the comparator on lines N-2 / N-1).
// The clock period is then set by one comparator instead of 2L of them.
//
// Interface: in_valid / in_data are sampled on every rising clock edge; there is no
// back-pressure, a data set can be offered every cycle. A data set offered in cycle t
// (in_valid high before edge t+1) comes out with out_valid / min_1st / min_2nd in
// cycle t+2L: latency 2L cycles, initiation interval 1. Only the valid bits are reset (rst_ni, asynchronous, active
// low); the data registers need no reset because nothing reads them while invalid.
//
// Inserting registers between the comparator levels is the published remedy for the
// low clock rate of the combinational circuit; placing one after every level, the
// valid chain and the reset are this implementation's choices.
module two_min_pipe
  import two_min_pkg::*;
#(
  parameter int unsigned N = 256,  // number of data items, a power of two >= 2
  parameter int unsigned M = 32    // data item width in bits
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                in_valid,
  input  logic [N-1:0][M-1:0] in_data,
  output logic                out_valid,
  output logic [M-1:0]        min_1st,
  output logic [M-1:0]        min_2nd
);

  localparam int unsigned L      = net_levels(N);
  localparam int unsigned STAGES = 2 * L;

  // data_q[s] is the input of stage s; data_q[0] is the (unregistered) circuit input
  logic [N-1:0][M-1:0] data_q [STAGES+1];
  // min1_q[s-L] travels with the data set in stage s (s = L .. 2L)
  logic [M-1:0]        min1_q [L+1];
  logic [STAGES:0]     valid_q;

  assign data_q[0]  = in_data;
  assign valid_q[0] = in_valid;
  assign min1_q[0]  = data_q[L][N-1];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [N-1:0][M-1:0] lvl_in;
    logic [N-1:0][M-1:0] lvl_out;

    if (s == L) begin : g_remove_min
      // start of the min_2nd network: replace min_1st by a copy of line N-2
      always_comb begin
        lvl_in      = data_q[s];
        lvl_in[N-1] = data_q[s][N-2];
      end
    end else begin : g_through
      assign lvl_in = data_q[s];
    end

    cmp_level #(
      .N        (N),
      .M        (M),
      .LEVEL    (s % L),
      .OMIT_LAST(s == L)
    ) u_level (
      .d_i(lvl_in),
      .d_o(lvl_out)
    );

    always_ff @(posedge clk_i) begin
      data_q[s+1] <= lvl_out;
    end

    if (s >= L) begin : g_min1
      always_ff @(posedge clk_i) begin
        min1_q[s-L+1] <= min1_q[s-L];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) valid_q[STAGES:1] <= '0;
    else         valid_q[STAGES:1] <= valid_q[STAGES-1:0];
  end

  assign out_valid = valid_q[STAGES];
  assign min_1st   = min1_q[L];
  assign min_2nd   = data_q[STAGES][N-1];

endmodule
