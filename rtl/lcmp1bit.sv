// lcmp1bit: one-bit "less" comparator cell of the minimum-SAD comparator.
//
// For one bit of a candidate SAD a (SAD_i) and the same bit of the SAD it is
// compared with, b (SAD_i-1): lt = a < b (an AND gate with an inverted a
// input) and ne = a differs from b (an XOR gate), as in the published cell.
// Purely combinational.
module lcmp1bit (
  input  logic a,
  input  logic b,
  output logic lt,
  output logic ne
);
  always_comb begin
    lt = ~a & b;
    ne = a ^ b;
  end
endmodule
