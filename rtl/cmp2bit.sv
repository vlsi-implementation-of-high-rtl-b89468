// cmp2bit: combining cell of the comparator tree in the absolute-difference
// unit.
//
// Merges the results of two comparator cells covering adjacent bit fields into
// the result for the joined field. The field `hi` holds the more significant
// bits: if it differs its verdict stands, otherwise the verdict of `lo` is
// taken. Built from inverters, AND and OR gates as the published cell is;
// which input is the more significant one is this implementation's reading.
// Purely combinational.
module cmp2bit
  import eds_pkg::*;
(
  input  cmp3_t hi,
  input  cmp3_t lo,
  output cmp3_t o
);
  always_comb begin
    o.lg = hi.lg | (~hi.ne & lo.lg);
    o.le = hi.le | (~hi.ne & lo.le);
    o.ne = hi.ne | lo.ne;
  end
endmodule
