// tb_min_network -- self-checking test of the min_1st comparator network.
//
// 1. The worked 8-item example (10 1 5 42 89 7 21 22 from line 0 down): after the three
//    levels the lines must read 10 5 42 7 89 21 22 1, the smallest item on line 7.
// 2. Random 8-bit data sets on a 16-line network: line 15 must be the minimum and the
//    output must be a permutation of the input (same sum and same multiset check by
//    counting every value).
// 3. Random data on a network at the default size (256 items of 32 bits), including the
//    first level without its last comparator: line N-1 must be the minimum.
module tb_min_network;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0][7:0]     d8_in, d8_out;
  logic [15:0][7:0]    d16_in, d16_out;
  logic [255:0][31:0]  dfull_in, dfull_out, domit_out;

  min_network #(.N(8),  .M(8)) u_n8  (.d_i(d8_in),  .d_o(d8_out));
  min_network #(.N(16), .M(8)) u_n16 (.d_i(d16_in), .d_o(d16_out));
  min_network                  u_nfull (.d_i(dfull_in), .d_o(dfull_out));
  min_network #(.OMIT_LAST_L0(1'b1)) u_nomit (.d_i(dfull_in), .d_o(domit_out));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int ex_in [8]  = '{10, 1, 5, 42, 89, 7, 21, 22};
    int ex_out [8] = '{10, 5, 42, 7, 89, 21, 22, 1};
    for (int k = 0; k < 8; k++) d8_in[k] = 8'(ex_in[k]);
    @(posedge clk);
    for (int k = 0; k < 8; k++)
      check(d8_out[k] == 8'(ex_out[k]),
            $sformatf("example line %0d: got %0d expected %0d", k, d8_out[k], ex_out[k]));

    for (int t = 0; t < 500; t++) begin
      int cnt [256];
      automatic logic [7:0] mn = 8'hff;
      for (int v = 0; v < 256; v++) cnt[v] = 0;
      for (int k = 0; k < 16; k++) begin
        d16_in[k] = 8'($urandom_range(0, (t % 2) ? 255 : 15));
        cnt[d16_in[k]]++;
        if (d16_in[k] < mn) mn = d16_in[k];
      end
      @(posedge clk);
      check(d16_out[15] == mn, $sformatf("N=16 min got %0d expected %0d", d16_out[15], mn));
      for (int k = 0; k < 16; k++) cnt[d16_out[k]]--;
      begin
        automatic bit perm = 1'b1;
        for (int v = 0; v < 256; v++) if (cnt[v] != 0) perm = 1'b0;
        check(perm, "N=16 output is not a permutation of the input");
      end
    end

    for (int t = 0; t < 100; t++) begin
      automatic logic [31:0] mn = '1;
      automatic logic [31:0] mn_omit = '1;
      for (int k = 0; k < 256; k++) begin
        dfull_in[k] = (t % 3 == 0) ? 32'($urandom_range(0, 1000)) : $urandom;
      end
      // the omitted-comparator network is fed lines N-2 and N-1 equal, as in use
      dfull_in[255] = dfull_in[254];
      for (int k = 0; k < 256; k++) if (dfull_in[k] < mn) mn = dfull_in[k];
      mn_omit = mn;
      @(posedge clk);
      check(dfull_out[255] == mn, $sformatf("N=256 min got %h expected %h", dfull_out[255], mn));
      check(domit_out[255] == mn_omit,
            $sformatf("N=256 omit-last min got %h expected %h", domit_out[255], mn_omit));
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
