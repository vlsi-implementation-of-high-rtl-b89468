// processing_element: accumulates the SAD of one candidate block.
//
// Each clock with in_valid high, the PE receives PPC (8) current pixels cb and
// the PPC reference pixels rb at the same positions of its candidate block.
//   stage 2: eight absolute-difference units, results registered;
//   stage 3: a compressor array reduces the eight differences to four rows,
//            registered;
//   stage 4: the accumulator adds the four rows to the running SAD.
// (Stage 1 is the data-fetch register in front of the PE.) After all 32
// beats of a 16x16 block have drained, `sad` holds the block's SAD. `clr`
// (the accumulator reset) empties the pipeline and zeroes the accumulator;
// with `en` low the PE ignores its input and keeps its registers still, which
// is how unused PEs are switched off. The absolute-difference / register /
// adder / accumulator chain follows the published PE; the split of the
// adder into a registered compressor stage is this implementation's choice.
module processing_element
  import eds_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    en,
  input  logic    in_valid,
  input  pixrow_t cb,
  input  pixrow_t rb,
  output sad_t    sad,
  output logic    busy      // a beat is still in the pipeline
);
  localparam int unsigned RW = 11;

  pixrow_t ad_c;            // combinational absolute differences
  pixrow_t ad_q;            // stage 2 register
  logic    v2, v3;
  logic [RW-1:0] r_s, r_c, r_c1, r_c2;     // combinational rows
  logic [RW-1:0] q_s, q_c, q_c1, q_c2;     // stage 3 register

  for (genvar k = 0; k < PPC; k++) begin : g_ad
    pix_t a_unused, b_unused;
    logic ne_unused;
    abs_diff_unit u_ad (
      .c(cb[k]), .r(rb[k]),
      .a(a_unused), .b(b_unused), .ne(ne_unused),
      .absd(ad_c[k])
    );
  end

  compressor_array #(.OUT_W(RW)) u_ca (
    .op(ad_q), .sum_row(r_s), .cy_row(r_c), .cy1_row(r_c1), .cy2_row(r_c2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2   <= 1'b0;
      v3   <= 1'b0;
      ad_q <= '0;
      q_s  <= '0;
      q_c  <= '0;
      q_c1 <= '0;
      q_c2 <= '0;
      sad  <= '0;
    end else if (clr) begin
      v2   <= 1'b0;
      v3   <= 1'b0;
      sad  <= '0;
    end else if (en) begin
      v2 <= in_valid;
      if (in_valid) ad_q <= ad_c;
      v3 <= v2;
      if (v2) begin
        q_s  <= r_s;
        q_c  <= r_c;
        q_c1 <= r_c1;
        q_c2 <= r_c2;
      end
      if (v3)
        sad <= sad + SAD_W'(q_s) + SAD_W'(q_c) + SAD_W'(q_c1) + SAD_W'(q_c2);
    end
  end

  assign busy = en & (v2 | v3);
endmodule
