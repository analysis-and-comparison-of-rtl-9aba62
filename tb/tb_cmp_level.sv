// tb_cmp_level -- self-checking test of one comparator level.
//
// Every level of a 16-line, 8-bit network is instantiated, plus a level 0 with its last
// comparator omitted. Random data sets (narrow values, so equal items occur) are
// applied and each output line is compared with a reference that walks the comparator
// pairs of the level directly: pair j spans lines s-1+2sj and 2s-1+2sj for s = 2**level.
module tb_cmp_level;
  localparam int N = 16;
  localparam int M = 8;
  localparam int L = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N-1:0][M-1:0] din;
  logic [N-1:0][M-1:0] dout [L];
  logic [N-1:0][M-1:0] dout_omit;

  for (genvar i = 0; i < L; i++) begin : g_lvl
    cmp_level #(.N(N), .M(M), .LEVEL(i)) u_lvl (.d_i(din), .d_o(dout[i]));
  end
  cmp_level #(.N(N), .M(M), .LEVEL(0), .OMIT_LAST(1'b1)) u_omit (.d_i(din), .d_o(dout_omit));

  function automatic logic [N-1:0][M-1:0] ref_level(input logic [N-1:0][M-1:0] d,
                                                    input int lvl, input bit omit);
    logic [N-1:0][M-1:0] r = d;
    int s = 1 << lvl;
    int pairs = N / (2 * s);
    if (omit) pairs--;
    for (int j = 0; j < pairs; j++) begin
      int up = 2 * s * j + s - 1;
      int dn = up + s;
      if (d[up] < d[dn]) begin
        r[up] = d[dn];
        r[dn] = d[up];
      end
    end
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < N; k++) din[k] = M'($urandom_range(0, (t % 2) ? 255 : 7));
      @(posedge clk);
      for (int i = 0; i < L; i++) begin
        checks++;
        if (dout[i] !== ref_level(din, i, 1'b0)) begin
          failures++;
          $display("FAIL level %0d in=%h out=%h", i, din, dout[i]);
        end
      end
      checks++;
      if (dout_omit !== ref_level(din, 0, 1'b1)) begin
        failures++;
        $display("FAIL omit-last level 0 in=%h out=%h", din, dout_omit);
      end
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
