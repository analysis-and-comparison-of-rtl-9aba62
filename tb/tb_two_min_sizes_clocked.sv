// tb_two_min_sizes_clocked -- all three engines at every evaluated size up to N = 256.
//
// Size points: M = 8 and M = 32 bits with N = 8, 16, 32, 64, 128 and 256 items. Every
// point gets a two_min, a two_min_pipe and a two_min_seq instance fed the same data
// sets (the N = 1024 / 2048 points are covered for the combinational engine alone,
// in the combinational size sweep). Each point runs 200 random data sets (every fourth with narrow
// values, so ties occur) against a linear-scan reference. A data set is applied for
// one cycle: the combinational result is checked in that cycle, the sequential one
// when done comes exactly 2 cycles later, the pipelined one when out_valid comes
// exactly 2*log2(N) cycles later. All points run in parallel on one clock; inputs
// change and outputs are sampled on the falling edge.
module tb_two_min_sizes_clocked;
  localparam int NPTS = 12;
  localparam int PT_M [NPTS] = '{8, 8, 8, 8, 8, 8, 32, 32, 32, 32, 32, 32};
  localparam int PT_N [NPTS] = '{8, 16, 32, 64, 128, 256, 8, 16, 32, 64, 128, 256};
  localparam int SETS = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;
  logic rst_n = 1'b0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  for (genvar p = 0; p < NPTS; p++) begin : g_pt
    localparam int  N      = PT_N[p];
    localparam int  M      = PT_M[p];
    localparam int  LAT    = 2 * $clog2(N);
    localparam bit  CLOCKED = (N <= 256);
    logic [N-1:0][M-1:0] d;
    logic [M-1:0]        m1, m2;
    logic                in_valid = 1'b0;
    logic                start = 1'b0;
    logic                p_valid = 1'b0, s_busy = 1'b0, s_done = 1'b0;
    logic [M-1:0]        p_m1 = '0, p_m2 = '0, s_m1 = '0, s_m2 = '0;

    two_min #(.N(N), .M(M)) u_comb (.in_data(d), .min_1st(m1), .min_2nd(m2));

    if (CLOCKED) begin : g_clocked
      two_min_pipe #(.N(N), .M(M)) u_pipe (
        .clk_i(clk), .rst_ni(rst_n), .in_valid(in_valid), .in_data(d),
        .out_valid(p_valid), .min_1st(p_m1), .min_2nd(p_m2)
      );
      two_min_seq #(.N(N), .M(M)) u_seq (
        .clk_i(clk), .rst_ni(rst_n), .start(start), .in_data(d),
        .busy(s_busy), .done(s_done), .min_1st(s_m1), .min_2nd(s_m2)
      );
    end

    initial begin
      @(posedge rst_n);
      for (int t = 0; t < SETS; t++) begin
        automatic logic [M-1:0] e1 = '1;
        automatic logic [M-1:0] e2 = '1;
        @(negedge clk);
        for (int k = 0; k < N; k++) begin
          d[k] = (t % 4 == 0) ? M'($urandom_range(0, 2 * N)) : M'($urandom);
          if (d[k] < e1) begin
            e2 = e1;
            e1 = d[k];
          end else if (d[k] < e2) begin
            e2 = d[k];
          end
        end
        in_valid = CLOCKED;
        start    = CLOCKED;
        #1;
        check(m1 == e1 && m2 == e2,
              $sformatf("comb M=%0d N=%0d set %0d: got %h %h expected %h %h", M, N, t, m1, m2, e1, e2));
        if (CLOCKED) begin
          for (int c = 1; c <= LAT; c++) begin
            @(negedge clk);
            in_valid = 1'b0;
            start    = 1'b0;
            d        = {N{M'($urandom)}};
            if (c == 2)
              check(s_done && s_m1 == e1 && s_m2 == e2,
                    $sformatf("seq M=%0d N=%0d set %0d: done=%b got %h %h expected %h %h",
                              M, N, t, s_done, s_m1, s_m2, e1, e2));
            else
              check(!s_done, $sformatf("seq M=%0d N=%0d: done in cycle %0d", M, N, c));
            if (c == LAT)
              check(p_valid && p_m1 == e1 && p_m2 == e2,
                    $sformatf("pipe M=%0d N=%0d set %0d: valid=%b got %h %h expected %h %h",
                              M, N, t, p_valid, p_m1, p_m2, e1, e2));
            else
              check(!p_valid, $sformatf("pipe M=%0d N=%0d: out_valid in cycle %0d", M, N, c));
          end
        end
      end
      finished++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (finished == NPTS);
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
