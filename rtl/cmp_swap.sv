// cmp_swap -- one comparator of the two-smallest-values network.
//
// Two M-bit unsigned items enter on an upper line (a_i) and a lower line (b_i). If the
// upper item is smaller than the lower one the two are swapped; otherwise both pass
// unchanged. The larger item therefore always leaves on the upper line (hi_o) and the
// smaller on the lower line (lo_o), so small values drift towards the bottom of the
// network. Equal items pass unchanged.
//
// Purely combinational, no clock. The swap rule follows the network definition; the
// unsigned comparison is this implementation's choice (items are plain bit vectors).
module cmp_swap #(
  parameter int unsigned M = 32   // data item width in bits
) (
  input  logic [M-1:0] a_i,  // upper input line
  input  logic [M-1:0] b_i,  // lower input line
  output logic [M-1:0] hi_o, // upper output line: max(a_i, b_i)
  output logic [M-1:0] lo_o  // lower output line: min(a_i, b_i)
);

  always_comb begin
    if (a_i < b_i) begin
      hi_o = b_i;
      lo_o = a_i;
    end else begin
      hi_o = a_i;
      lo_o = b_i;
    end
  end

endmodule
