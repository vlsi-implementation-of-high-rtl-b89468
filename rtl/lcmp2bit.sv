// lcmp2bit: combining cell of the "less" comparator tree.
//
// Joins the results of two adjacent bit fields, `hi` the more significant:
// lt = hi_lt | (~hi_ne & lo_lt), ne = hi_ne | lo_ne. The published cell is
// drawn with AND gates and an OR gate with one inverted input; the exact
// polarity of its equality signal is this implementation's choice, kept
// consistent with the XOR (not-equal) output of the one-bit cell.
// Purely combinational.
module lcmp2bit (
  input  logic hi_lt,
  input  logic hi_ne,
  input  logic lo_lt,
  input  logic lo_ne,
  output logic lt,
  output logic ne
);
  always_comb begin
    lt = hi_lt | (~hi_ne & lo_lt);
    ne = hi_ne | lo_ne;
  end
endmodule
