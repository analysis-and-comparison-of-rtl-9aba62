// two_min_seq -- two-step sequential two-smallest-values circuit.
//
// Only one min_network (N-1 comparators) is built and used twice. In step 1 it works on
// the input data set; its whole N*M-bit output is stored in the work register, whose
// bottom line is then min_1st. In step 2 the network works on the work register with line
// N-1 replaced by line N-2 (min_1st removed), and its bottom line is min_2nd. This
// halves the comparators of two_min at the price of a second clock cycle.
//
// Interface (clk_i rising edge, rst_ni asynchronous active low):
//   start    - sampled with in_data on a rising edge while busy is low; in_data need
//              only be valid in that cycle. start while busy is ignored.
//   busy     - high during step 2 (the cycle after the start cycle).
//   done     - one-cycle pulse two cycles after the start cycle (step 1 ends on the
//              first edge, step 2 on the second); min_1st and min_2nd are valid from
//              then until the next done.
// A new data set can be started in the cycle where done is high, i.e. every 2 cycles.
//
// Reusing one comparator group in two steps with an N*M-bit register between them is
// the published proposal for saving comparators; the start/busy/done handshake, the
// separate result registers and the reset are this implementation's choices.
module two_min_seq #(
  parameter int unsigned N = 256,  // number of data items, a power of two >= 2
  parameter int unsigned M = 32    // data item width in bits
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                start,
  input  logic [N-1:0][M-1:0] in_data,
  output logic                busy,
  output logic                done,
  output logic [M-1:0]        min_1st,
  output logic [M-1:0]        min_2nd
);

  typedef enum logic {
    S_STEP1 = 1'b0,  // idle; a start runs step 1 in this cycle
    S_STEP2 = 1'b1   // step 2 on the work register
  } state_e;

  state_e              state_q;
  logic [N-1:0][M-1:0] work_q;    // network output of step 1
  logic [N-1:0][M-1:0] net_in;
  logic [N-1:0][M-1:0] net_out;

  // network input multiplexer: input data in step 1, work register minus min_1st in step 2
  always_comb begin
    if (state_q == S_STEP2) begin
      net_in      = work_q;
      net_in[N-1] = work_q[N-2];
    end else begin
      net_in      = in_data;
    end
  end

  min_network #(.N(N), .M(M), .OMIT_LAST_L0(1'b0)) u_net (
    .d_i(net_in),
    .d_o(net_out)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_STEP1;
      done    <= 1'b0;
      min_1st <= '0;
      min_2nd <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_STEP1: begin
          if (start) state_q <= S_STEP2;
        end
        S_STEP2: begin
          min_1st <= work_q[N-1];
          min_2nd <= net_out[N-1];
          done    <= 1'b1;
          state_q <= S_STEP1;
        end
        default: state_q <= S_STEP1;
      endcase
    end
  end

  // the work register needs no reset: it is only read in step 2, after step 1 wrote it
  always_ff @(posedge clk_i) begin
    if (state_q == S_STEP1 && start) work_q <= net_out;
  end

  assign busy = (state_q == S_STEP2);

endmodule
