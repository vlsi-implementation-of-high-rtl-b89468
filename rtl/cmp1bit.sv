// cmp1bit: one-bit magnitude comparator cell of the absolute-difference unit.
//
// Compares one bit c of the current pixel with the same bit r of the
// reference pixel. le = c < r (an inverter on c and an AND gate), lg = c > r
// (an inverter on r and an AND gate), ne = c differs from r (an XOR gate).
// These three gates are the published structure of the cell; it is purely
// combinational.
module cmp1bit
  import eds_pkg::*;
(
  input  logic  c,
  input  logic  r,
  output cmp3_t o
);
  always_comb begin
    o.le = ~c & r;
    o.lg = c & ~r;
    o.ne = c ^ r;
  end
endmodule
