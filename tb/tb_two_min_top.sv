// tb_two_min_top -- end-to-end test of the top at its default size (256 x 32-bit items).
//
// One random stream of data sets drives all three engines at once. Every cycle the
// combinational outputs are checked against a linear-scan reference; the pipelined
// engine is checked through a scoreboard (results in order, exactly 2*log2(N) cycles
// after the set was offered); the sequential engine is started on random cycles and
// checked two cycles later. The stream includes the 8-item worked example and small
// data sets padded to 256 items with the largest value, as a smaller problem would be
// run on this circuit. Each mechanism is counted and must occur at least once:
// repeated minimum, padded set, pipeline back-to-back input and bubble, sequential
// start refused while busy and sequential restart in the done cycle.
module tb_two_min_top;
  localparam int N   = 256;
  localparam int M   = 32;
  localparam int LAT = 2 * $clog2(N);

  typedef struct {
    logic [M-1:0] m1;
    logic [M-1:0] m2;
    int           cyc;
  } exp_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  logic                rst_n, in_valid, seq_start;
  logic [N-1:0][M-1:0] in_data;
  logic [M-1:0]        comb_min_1st, comb_min_2nd, pipe_min_1st, pipe_min_2nd;
  logic [M-1:0]        seq_min_1st, seq_min_2nd;
  logic                pipe_valid, seq_busy, seq_done;

  two_min_top u_top (
    .clk_i(clk), .rst_ni(rst_n), .in_data(in_data),
    .comb_min_1st(comb_min_1st), .comb_min_2nd(comb_min_2nd),
    .in_valid(in_valid), .pipe_valid(pipe_valid),
    .pipe_min_1st(pipe_min_1st), .pipe_min_2nd(pipe_min_2nd),
    .seq_start(seq_start), .seq_busy(seq_busy), .seq_done(seq_done),
    .seq_min_1st(seq_min_1st), .seq_min_2nd(seq_min_2nd)
  );

  exp_t pq [$];
  exp_t sq [$];
  int n_tie = 0, n_padded = 0, n_example = 0, n_b2b = 0, n_bubble = 0;
  int n_seq_refused = 0, n_seq_restart = 0, n_pipe_out = 0, n_seq_out = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic exp_t ref2(input logic [N-1:0][M-1:0] d);
    exp_t e;
    e.m1 = '1;
    e.m2 = '1;
    for (int k = 0; k < N; k++) begin
      if (d[k] < e.m1) begin
        e.m2 = e.m1;
        e.m1 = d[k];
      end else if (d[k] < e.m2) begin
        e.m2 = d[k];
      end
    end
    e.cyc = 0;
    return e;
  endfunction

  task automatic new_data(input int t);
    automatic int kind = $urandom_range(0, 9);
    if (t == 5) begin
      automatic int ex [8] = '{10, 1, 5, 42, 89, 7, 21, 22};
      in_data = '1;
      for (int k = 0; k < 8; k++) in_data[k] = M'(ex[k]);
      n_example++;
    end else if (kind == 0) begin
      // small set (8 .. 128 items) padded with the largest value
      automatic int n = 8 << $urandom_range(0, 4);
      in_data = '1;
      for (int k = 0; k < n; k++) in_data[k] = M'($urandom);
      n_padded++;
    end else if (kind == 1) begin
      for (int k = 0; k < N; k++) in_data[k] = M'($urandom_range(0, 30));
    end else begin
      for (int k = 0; k < N; k++) in_data[k] = M'($urandom);
    end
  endtask

  logic prev_valid = 1'b0;
  logic prev_done  = 1'b0;

  initial begin
    rst_n     = 1'b0;
    in_valid  = 1'b0;
    seq_start = 1'b0;
    in_data   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      automatic exp_t e;
      @(negedge clk);
      // outputs of the clocked engines after the last rising edge
      if (pipe_valid) begin
        n_pipe_out++;
        if (pq.size() == 0) check(1'b0, "pipe output with nothing in flight");
        else begin
          automatic exp_t h = pq.pop_front();
          check(pipe_min_1st == h.m1 && pipe_min_2nd == h.m2 && cycle - h.cyc == LAT,
                $sformatf("pipe: got %h %h after %0d cycles, expected %h %h after %0d",
                          pipe_min_1st, pipe_min_2nd, cycle - h.cyc, h.m1, h.m2, LAT));
        end
      end
      if (seq_done) begin
        n_seq_out++;
        if (sq.size() == 0) check(1'b0, "seq done with nothing started");
        else begin
          automatic exp_t h = sq.pop_front();
          check(seq_min_1st == h.m1 && seq_min_2nd == h.m2 && cycle - h.cyc == 2,
                $sformatf("seq: got %h %h after %0d cycles, expected %h %h after 2",
                          seq_min_1st, seq_min_2nd, cycle - h.cyc, h.m1, h.m2));
        end
      end
      // new inputs for this cycle
      new_data(t);
      e = ref2(in_data);
      e.cyc = cycle;
      if (e.m1 == e.m2) n_tie++;
      #1;
      check(comb_min_1st == e.m1 && comb_min_2nd == e.m2,
            $sformatf("comb: got %h %h expected %h %h", comb_min_1st, comb_min_2nd, e.m1, e.m2));
      in_valid = ($urandom_range(0, 4) != 0) && (t < 1450);
      if (in_valid) begin
        pq.push_back(e);
        if (prev_valid) n_b2b++;
      end else if (prev_valid) begin
        n_bubble++;
      end
      prev_valid = in_valid;
      seq_start = ($urandom_range(0, 2) != 0) && (t < 1450);
      if (seq_start && seq_busy) n_seq_refused++;
      if (seq_start && !seq_busy) begin
        sq.push_back(e);
        if (seq_done) n_seq_restart++;
      end
    end
    check(pq.size() == 0 && sq.size() == 0, "results missing at the end");
    check(n_example == 1, "worked example not run");
    check(n_tie > 0, "no data set with a repeated minimum");
    check(n_padded > 0, "no padded small data set");
    check(n_b2b > 0, "pipeline never took back-to-back sets");
    check(n_bubble > 0, "pipeline never had a bubble");
    check(n_seq_refused > 0, "sequential engine never refused a start while busy");
    check(n_seq_restart > 0, "sequential engine never restarted in its done cycle");
    $display("top: ties=%0d padded=%0d pipe_out=%0d b2b=%0d bubbles=%0d seq_out=%0d refused=%0d restarts=%0d",
             n_tie, n_padded, n_pipe_out, n_b2b, n_bubble, n_seq_out, n_seq_refused, n_seq_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
