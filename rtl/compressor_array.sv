// compressor_array: carry-save sum of eight 8-bit operands.
//
// Each bit column j holds one bit of each operand A0..A7. A 3-2 compressor
// adds A0..A2 of the column; a 5-2 compressor adds A3..A7 together with the
// 3-2 sum of the same column (cin2) and the 3-2 carry arriving from column
// j-1 (cin1). The column leaves its sum bit and three carries of the next
// weight. The four resulting rows add up to the exact total:
//   sum_row + cy_row + cy1_row + cy2_row = A0 + ... + A7  (at most 2040).
// Pairing one 3-2 and one 5-2 compressor on A0..A7 follows the published
// figure; taking cin1 from the neighbouring column, so that all weights
// match, is this implementation's reading of it. Purely combinational.
module compressor_array
  import eds_pkg::*;
#(
  parameter int unsigned OUT_W = 11      // wide enough for 8 * 255
) (
  input  pixrow_t           op,          // op[k] is operand Ak
  output logic [OUT_W-1:0]  sum_row,
  output logic [OUT_W-1:0]  cy_row,
  output logic [OUT_W-1:0]  cy1_row,
  output logic [OUT_W-1:0]  cy2_row
);
  logic [OUT_W-1:0] s32;
  logic [OUT_W:0]   c32;    // c32[j] is the 3-2 carry into column j
  logic [OUT_W:0]   co, co1, co2;
  logic [7:0]       colbit [OUT_W];

  always_comb begin
    for (int j = 0; j < OUT_W; j++)
      for (int k = 0; k < 8; k++)
        colbit[j][k] = (j < 8) ? op[k][j] : 1'b0;
  end

  assign c32[0] = 1'b0;
  assign co[0]  = 1'b0;
  assign co1[0] = 1'b0;
  assign co2[0] = 1'b0;

  for (genvar j = 0; j < OUT_W; j++) begin : g_col
    compressor_3_2 u_c32 (
      .a0(colbit[j][0]), .a1(colbit[j][1]), .a2(colbit[j][2]),
      .sum(s32[j]), .cout(c32[j+1])
    );
    compressor_5_2 u_c52 (
      .a3(colbit[j][3]), .a4(colbit[j][4]), .a5(colbit[j][5]),
      .a6(colbit[j][6]), .a7(colbit[j][7]),
      .cin1(c32[j]), .cin2(s32[j]),
      .sum(sum_row[j]), .cout(co[j+1]), .cout1(co1[j+1]), .cout2(co2[j+1])
    );
  end

  // The top carries are always zero for eight 8-bit operands.
  assign cy_row  = co[OUT_W-1:0];
  assign cy1_row = co1[OUT_W-1:0];
  assign cy2_row = co2[OUT_W-1:0];
endmodule
