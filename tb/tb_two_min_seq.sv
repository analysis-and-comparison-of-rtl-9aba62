// tb_two_min_seq -- self-checking test of the two-step sequential circuit.
//
// Default size (256 items of 32 bits). Data sets are started with gaps of 0 to 3
// cycles; in_data is replaced by garbage right after each start cycle, so the circuit
// must work from its own register in step 2. Checked: done comes exactly two cycles
// after the start cycle, busy is high in between, the results match a linear-scan
// reference and stay stable until the next done, and a start raised while busy is
// ignored (no extra done, results unchanged).
module tb_two_min_seq;
  localparam int N = 256;
  localparam int M = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                rst_n, start, busy, done;
  logic [N-1:0][M-1:0] in_data;
  logic [M-1:0]        min_1st, min_2nd;

  two_min_seq u_dut (
    .clk_i(clk), .rst_ni(rst_n), .start(start), .in_data(in_data),
    .busy(busy), .done(done), .min_1st(min_1st), .min_2nd(min_2nd)
  );

  int n_ignored = 0, n_runs = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    automatic logic [M-1:0] e1, e2;
    rst_n   = 1'b0;
    start   = 1'b0;
    in_data = '0;
    repeat (3) @(negedge clk);
    check(done == 1'b0 && busy == 1'b0, "not idle after reset");
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      // start cycle
      e1 = '1;
      e2 = '1;
      for (int k = 0; k < N; k++) begin
        in_data[k] = (t % 4 == 0) ? M'($urandom_range(0, 20)) : M'($urandom);
        if (in_data[k] < e1) begin
          e2 = e1;
          e1 = in_data[k];
        end else if (in_data[k] < e2) begin
          e2 = in_data[k];
        end
      end
      start = 1'b1;
      @(negedge clk);
      // step 2 cycle: inputs gone, maybe a start that must be ignored
      in_data = {N{M'($urandom)}};
      start   = (t % 3 == 0);
      if (start) n_ignored++;
      check(busy == 1'b1 && done == 1'b0, $sformatf("run %0d: busy/done wrong in step 2", t));
      @(negedge clk);
      start = 1'b0;
      check(done == 1'b1 && busy == 1'b0, $sformatf("run %0d: done not two cycles after start", t));
      check(min_1st == e1 && min_2nd == e2,
            $sformatf("run %0d: got %h %h expected %h %h", t, min_1st, min_2nd, e1, e2));
      n_runs++;
      // idle gap: results must hold, no further done
      for (int g = $urandom_range(0, 3); g > 0; g--) begin
        @(negedge clk);
        check(done == 1'b0 && busy == 1'b0 && min_1st == e1 && min_2nd == e2,
              $sformatf("run %0d: outputs changed while idle", t));
      end
    end
    check(n_ignored > 0, "no start while busy was tried");
    $display("seq: %0d runs, %0d starts while busy ignored", n_runs, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
