// tb_two_min_pipe -- self-checking test of the pipelined two-smallest-values circuit.
//
// The default-size instance (256 items of 32 bits, 16 stages) is fed random data sets
// with in_valid high about three cycles in four, so both back-to-back streams and
// bubbles occur. A scoreboard queue holds the expected pair (linear-scan reference)
// and the cycle each set was offered; every out_valid must match the queue head and
// arrive exactly 2*log2(N) cycles after that set was offered, and nothing may come
// out that was not put in. A short reset in mid-run must drop everything in flight.
// Inputs change on the falling edge, outputs are sampled on the falling edge.
module tb_two_min_pipe;
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
  int cycle = 0;  // rising edges so far
  always @(posedge clk) cycle++;

  logic               rst_n;
  logic               in_valid;
  logic [N-1:0][M-1:0] in_data;
  logic               out_valid;
  logic [M-1:0]       min_1st, min_2nd;

  two_min_pipe u_dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .min_1st(min_1st), .min_2nd(min_2nd)
  );

  exp_t q [$];
  int n_b2b = 0, n_bubble = 0, n_out = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // check the outputs that follow rising edge `cycle`
  task automatic check_outputs();
    if (out_valid) begin
      n_out++;
      if (q.size() == 0) begin
        check(1'b0, $sformatf("cycle %0d: out_valid with nothing in flight", cycle));
      end else begin
        automatic exp_t e = q.pop_front();
        check(min_1st == e.m1 && min_2nd == e.m2,
              $sformatf("cycle %0d: got %h %h expected %h %h", cycle, min_1st, min_2nd, e.m1, e.m2));
        check(cycle - e.cyc == LAT,
              $sformatf("latency %0d cycles, expected %0d", cycle - e.cyc, LAT));
      end
    end
  endtask

  logic prev_valid = 1'b0;

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check_outputs();
      if (t == 1500) begin
        // reset with sets in flight: they must all vanish
        rst_n = 1'b0;
        #1;
        check(out_valid == 1'b0, "out_valid not cleared by reset");
        q.delete();
        in_valid = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        continue;
      end
      in_valid = ($urandom_range(0, 3) != 0) && (t < 2900);
      if (in_valid) begin
        automatic exp_t e;
        e.m1 = '1;
        e.m2 = '1;
        for (int k = 0; k < N; k++) begin
          in_data[k] = (t % 5 == 0) ? M'($urandom_range(0, 40)) : M'($urandom);
          if (in_data[k] < e.m1) begin
            e.m2 = e.m1;
            e.m1 = in_data[k];
          end else if (in_data[k] < e.m2) begin
            e.m2 = in_data[k];
          end
        end
        e.cyc = cycle;
        q.push_back(e);
        if (prev_valid) n_b2b++;
      end else begin
        in_data = {N{M'($urandom)}};  // garbage while idle
        if (prev_valid) n_bubble++;
      end
      prev_valid = in_valid;
    end
    check(q.size() == 0, $sformatf("%0d data sets never came out", q.size()));
    check(n_b2b > 0 && n_bubble > 0, "stream had no back-to-back sets or no bubbles");
    $display("pipe: %0d results, %0d back-to-back inputs, %0d bubbles", n_out, n_b2b, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
