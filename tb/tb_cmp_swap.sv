// tb_cmp_swap -- self-checking test of the single comparator.
//
// A 4-bit instance is checked exhaustively (all 256 input pairs) and a 32-bit instance
// (the default width) with random pairs, including equal ones. Expected: the upper
// output is the larger input, the lower output the smaller one. Purely combinational;
// a free-running clock only paces the stimulus and the watchdog.
module tb_cmp_swap;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, hi4, lo4;
  logic [31:0] a32, b32, hi32, lo32;

  cmp_swap #(.M(4)) u_small (.a_i(a4),  .b_i(b4),  .hi_o(hi4),  .lo_o(lo4));
  cmp_swap           u_full  (.a_i(a32), .b_i(b32), .hi_o(hi32), .lo_o(lo32));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        a4 = 4'(a);
        b4 = 4'(b);
        @(posedge clk);
        check(hi4 == 4'((a > b) ? a : b) && lo4 == 4'((a > b) ? b : a),
              $sformatf("M=4 a=%0d b=%0d hi=%0d lo=%0d", a, b, hi4, lo4));
      end
    end
    for (int t = 0; t < 2000; t++) begin
      a32 = $urandom;
      b32 = (t % 10 == 0) ? a32 : $urandom;
      @(posedge clk);
      check(hi32 == ((a32 > b32) ? a32 : b32) && lo32 == ((a32 > b32) ? b32 : a32),
            $sformatf("M=32 a=%h b=%h hi=%h lo=%h", a32, b32, hi32, lo32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
