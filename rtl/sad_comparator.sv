// sad_comparator: picks the minimum SAD of a search step and its position.
//
// The candidate for the centre is PE 0's SAD when PE 0 ran (first step of a
// block) and otherwise the minimum kept from the previous step, which is the
// SAD of the current centre. The four arms are then compared in order
// (+x, -x, +y, -y) against the best so far by four tree comparators made of
// one-bit and two-bit "less" cells; an arm replaces the best only if its PE
// ran and its SAD is strictly smaller, so ties keep the centre and then the
// earlier arm. On `cmp` the minimum, its position and the motion vector
// (centre plus the position's offset times the pattern radius) are
// registered and stay until the next `cmp`. The use of less-comparator cells
// is published; the sequential order and the tie rule are this
// implementation's choices.
module sad_comparator
  import eds_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmp,
  input  logic            scdp,
  input  mv_pair_t        centre,
  input  logic [NPE-1:0]  en,
  input  sad_t            sad [NPE],
  output sad_t            min_sad,
  output pt_e             pos,
  output mv_pair_t        mv
);
  sad_t best [NPE];
  pt_e  bpos [NPE];
  logic lt   [NPE];
  logic ne_unused [NPE];
  mv_pair_t mv_c;

  assign best[0] = en[0] ? sad[0] : min_sad;
  assign bpos[0] = PT_C;
  assign lt[0]   = 1'b0;
  assign ne_unused[0] = 1'b0;

  for (genvar p = 1; p < NPE; p++) begin : g_chain
    sad_less #(.W(SAD_W)) u_lt (
      .a(sad[p]), .b(best[p-1]), .lt(lt[p]), .ne(ne_unused[p])
    );
    assign best[p] = (en[p] && lt[p]) ? sad[p] : best[p-1];
    assign bpos[p] = (en[p] && lt[p]) ? pt_e'(p) : bpos[p-1];
  end

  always_comb begin
    int rad;
    rad    = scdp ? 1 : 2;
    mv_c.x = mv_t'(int'(centre.x) + dx_of(bpos[NPE-1]) * rad);
    mv_c.y = mv_t'(int'(centre.y) + dy_of(bpos[NPE-1]) * rad);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_sad <= '1;
      pos     <= PT_C;
      mv      <= '0;
    end else if (cmp) begin
      min_sad <= best[NPE-1];
      pos     <= bpos[NPE-1];
      mv      <= mv_c;
    end
  end
endmodule
