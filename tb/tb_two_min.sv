// tb_two_min -- self-checking test of the combinational two-smallest-values circuit.
//
// Reference: a single linear scan keeping the two smallest items seen so far (so a
// repeated minimum gives min_2nd == min_1st), written independently of the network.
// Instances: the 8-item worked example (expects 1 and 5), random 8-item sets with
// narrow values (many ties), the smallest network (N=2), and the default size
// (256 items of 32 bits) with random data, ties and minima placed on every line.
module tb_two_min;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0][7:0]    d8;
  logic [7:0]         m1_8, m2_8;
  logic [1:0][7:0]    d2;
  logic [7:0]         m1_2, m2_2;
  logic [255:0][31:0] df;
  logic [31:0]        m1_f, m2_f;

  two_min #(.N(8), .M(8)) u_n8 (.in_data(d8), .min_1st(m1_8), .min_2nd(m2_8));
  two_min #(.N(2), .M(8)) u_n2 (.in_data(d2), .min_1st(m1_2), .min_2nd(m2_2));
  two_min                 u_nf (.in_data(df), .min_1st(m1_f), .min_2nd(m2_f));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // two smallest by linear scan
  function automatic void ref2(input logic [31:0] v [], output logic [31:0] a,
                               output logic [31:0] b);
    a = '1;
    b = '1;
    foreach (v[k]) begin
      if (v[k] < a) begin
        b = a;
        a = v[k];
      end else if (v[k] < b) begin
        b = v[k];
      end
    end
  endfunction

  initial begin
    automatic logic [31:0] v [];
    automatic logic [31:0] e1, e2;
    automatic int ex [8] = '{10, 1, 5, 42, 89, 7, 21, 22};

    for (int k = 0; k < 8; k++) d8[k] = 8'(ex[k]);
    @(posedge clk);
    check(m1_8 == 8'd1 && m2_8 == 8'd5,
          $sformatf("example: got %0d %0d expected 1 5", m1_8, m2_8));

    v = new[8];
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 8; k++) begin
        d8[k] = 8'($urandom_range(0, (t % 3 == 0) ? 3 : 255));
        v[k]  = 32'(d8[k]);
      end
      ref2(v, e1, e2);
      @(posedge clk);
      check(m1_8 == e1[7:0] && m2_8 == e2[7:0],
            $sformatf("N=8 in=%h got %0d %0d expected %0d %0d", d8, m1_8, m2_8, e1, e2));
    end

    v = new[2];
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 2; k++) begin
        d2[k] = 8'($urandom_range(0, 15));
        v[k]  = 32'(d2[k]);
      end
      ref2(v, e1, e2);
      @(posedge clk);
      check(m1_2 == e1[7:0] && m2_2 == e2[7:0],
            $sformatf("N=2 in=%h got %0d %0d expected %0d %0d", d2, m1_2, m2_2, e1, e2));
    end

    v = new[256];
    for (int t = 0; t < 600; t++) begin
      for (int k = 0; k < 256; k++) begin
        df[k] = (t % 4 == 0) ? 32'($urandom_range(0, 300)) : $urandom;
      end
      // walk the two smallest values over all line positions
      if (t < 256) begin
        df[t]             = 32'd0;
        df[(t * 37) % 256] = (t % 2) ? 32'd0 : 32'd1;
      end
      for (int k = 0; k < 256; k++) v[k] = df[k];
      ref2(v, e1, e2);
      @(posedge clk);
      check(m1_f == e1 && m2_f == e2,
            $sformatf("N=256 t=%0d got %h %h expected %h %h", t, m1_f, m2_f, e1, e2));
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
