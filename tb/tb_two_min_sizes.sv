// tb_two_min_sizes -- the combinational circuit at every evaluated size.
//
// One two_min instance per size point: M = 8 and M = 32 bits with N = 8, 16, 32, 64,
// 128 and 256 items, and the scalability points N = 1024 and N = 2048 at M = 32.
// Each instance gets 200 random data sets (every fourth with narrow values, so ties
// occur) and is checked against a linear-scan reference. All instances run in
// parallel, paced by one clock.
module tb_two_min_sizes;
  localparam int NPTS = 14;
  localparam int PT_M [NPTS] = '{8, 8, 8, 8, 8, 8, 32, 32, 32, 32, 32, 32, 32, 32};
  localparam int PT_N [NPTS] = '{8, 16, 32, 64, 128, 256, 8, 16, 32, 64, 128, 256, 1024, 2048};
  localparam int SETS = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;

  for (genvar p = 0; p < NPTS; p++) begin : g_pt
    localparam int N = PT_N[p];
    localparam int M = PT_M[p];
    logic [N-1:0][M-1:0] d;
    logic [M-1:0]        m1, m2;

    two_min #(.N(N), .M(M)) u_dut (.in_data(d), .min_1st(m1), .min_2nd(m2));

    initial begin
      for (int t = 0; t < SETS; t++) begin
        automatic logic [M-1:0] e1 = '1;
        automatic logic [M-1:0] e2 = '1;
        for (int k = 0; k < N; k++) begin
          d[k] = (t % 4 == 0) ? M'($urandom_range(0, 2 * N)) : M'($urandom);
          if (d[k] < e1) begin
            e2 = e1;
            e1 = d[k];
          end else if (d[k] < e2) begin
            e2 = d[k];
          end
        end
        @(posedge clk);
        checks++;
        if (m1 != e1 || m2 != e2) begin
          failures++;
          $display("FAIL M=%0d N=%0d set %0d: got %h %h expected %h %h", M, N, t, m1, m2, e1, e2);
        end
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NPTS);
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
