// data_fetch_initializer: prepares the data-fetch unit for one search step.
//
// On `init` it registers, from the current search centre and pattern size
// (radius 2 for the large cross diamond, 1 for the small one):
//   * base_row[p] / base_col[p], the top-left corner in the reference area of
//     the candidate block of pattern point p. The centre displacement (0, 0)
//     lies at (RANGE, RANGE) = (8, 8);
//   * n_points, how many candidate points are fetched together (enabled PEs);
//   * n_cycles, the beats needed to stream one block (BLK*BLK/PPC = 32).
// `clr` (states S0, S1 and S5) returns the outputs to their reset values.
// The list of duties is the published one; the encoding is this
// implementation's.
module data_fetch_initializer
  import eds_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              init,
  input  logic              scdp,       // 1: radius 1, 0: radius 2
  input  mv_pair_t          centre,
  input  logic [NPE-1:0]    en,         // PEs the enabler switches on
  output coord_t            base_row [NPE],
  output coord_t            base_col [NPE],
  output logic [2:0]        n_points,
  output logic [5:0]        n_cycles
);
  coord_t row_c [NPE];
  coord_t col_c [NPE];
  logic [2:0] cnt_c;

  always_comb begin
    int rad;
    rad = scdp ? 1 : 2;
    cnt_c = '0;
    for (int p = 0; p < NPE; p++) begin
      row_c[p] = coord_t'(int'(RANGE) + int'(centre.y) + dy_of(pt_e'(p)) * rad);
      col_c[p] = coord_t'(int'(RANGE) + int'(centre.x) + dx_of(pt_e'(p)) * rad);
      cnt_c    = cnt_c + 3'(en[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPE; p++) begin
        base_row[p] <= '0;
        base_col[p] <= '0;
      end
      n_points <= '0;
      n_cycles <= 6'(FETCH_CYC);
    end else if (clr) begin
      for (int p = 0; p < NPE; p++) begin
        base_row[p] <= '0;
        base_col[p] <= '0;
      end
      n_points <= '0;
      n_cycles <= 6'(FETCH_CYC);
    end else if (init) begin
      base_row <= row_c;
      base_col <= col_c;
      n_points <= cnt_c;
      n_cycles <= 6'(FETCH_CYC);
    end
  end
endmodule
