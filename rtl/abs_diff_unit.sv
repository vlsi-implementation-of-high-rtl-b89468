// abs_diff_unit: absolute difference |C - R| of two 8-bit pixels.
//
// A tree of eight one-bit comparator cells and seven combining cells decides
// whether C < R (le), C > R (lg) or C differs from R (ne). Two XOR arrays then
// invert the smaller operand: A = C ^ {8{le}}, B = R ^ {8{lg}}. For C != R,
// A + B + 1 (mod 256) is the larger minus the smaller operand, because the
// inverted operand equals 255 minus itself. For C == R both words are masked
// to zero so the result is 0. The comparator tree and XOR arrays follow the
// published unit; the final masked add that forms the difference is this
// implementation's choice, since the published unit stops at A, B and ne.
// Purely combinational.
module abs_diff_unit
  import eds_pkg::*;
(
  input  pix_t c,
  input  pix_t r,
  output pix_t a,      // C after the XOR array
  output pix_t b,      // R after the XOR array
  output logic ne,     // C differs from R
  output pix_t absd    // |C - R|
);
  // lvl[0] holds the eight bit cells, lvl[k] the 8 >> k merged fields.
  cmp3_t lvl0 [8];
  cmp3_t lvl1 [4];
  cmp3_t lvl2 [2];
  cmp3_t top;

  for (genvar i = 0; i < 8; i++) begin : g_bit
    cmp1bit u_c1 (.c(c[i]), .r(r[i]), .o(lvl0[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g_l1
    cmp2bit u_c2 (.hi(lvl0[2*i+1]), .lo(lvl0[2*i]), .o(lvl1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_l2
    cmp2bit u_c2 (.hi(lvl1[2*i+1]), .lo(lvl1[2*i]), .o(lvl2[i]));
  end
  cmp2bit u_root (.hi(lvl2[1]), .lo(lvl2[0]), .o(top));

  pix_t mask;
  always_comb begin
    a    = c ^ {8{top.le}};
    b    = r ^ {8{top.lg}};
    ne   = top.ne;
    mask = {8{top.ne}};
    absd = (a & mask) + (b & mask) + {7'd0, top.ne};
  end
endmodule
