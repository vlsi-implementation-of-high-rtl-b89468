// pe_array_enabler: switches on only the PEs whose search points are new.
//
// On `init` it registers en[p] for the five points of the pattern about
// `centre`:
//   * the centre PE only in the first step of a block; later the centre is the
//     previous winner and its SAD is already held by the comparator;
//   * no arm whose candidate block would leave the search area (|x| or |y|
//     above RANGE);
//   * in a large-pattern step after a move, not the arm pointing back to the
//     previous centre (opposite of last_dir) and, after two moves, not the arm
//     opposite prev_dir, whose point was an arm of the pattern two steps ago.
// `clr` (states S0, S1 and S5) switches every PE off until the next `init`.
// This leaves three new points after a straight move and two after a turn,
// as the search is described. The small pattern's four arms are always new.
// Its duty (switching on PEs by search path, to save power) is published; the
// rule above is this implementation's way of doing it.
module pe_array_enabler
  import eds_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            init,
  input  logic            first,
  input  logic            scdp,
  input  mv_pair_t        centre,
  input  logic            last_valid,
  input  pt_e             last_dir,
  input  logic            prev_valid,
  input  pt_e             prev_dir,
  output logic [NPE-1:0]  en,
  output logic [NPE-1:0]  en_next     // combinational, for the initializer
);
  always_comb begin
    int rad, x, y;
    rad = scdp ? 1 : 2;
    for (int p = 0; p < NPE; p++) begin
      x = int'(centre.x) + dx_of(pt_e'(p)) * rad;
      y = int'(centre.y) + dy_of(pt_e'(p)) * rad;
      if (pt_e'(p) == PT_C)
        en_next[p] = first;
      else begin
        en_next[p] = (x <= int'(RANGE)) && (x >= -int'(RANGE)) &&
                     (y <= int'(RANGE)) && (y >= -int'(RANGE));
        if (!scdp && last_valid && pt_e'(p) == opposite(last_dir)) en_next[p] = 1'b0;
        if (!scdp && prev_valid && pt_e'(p) == opposite(prev_dir)) en_next[p] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     en <= '0;
    else if (clr)   en <= '0;
    else if (init)  en <= en_next;
  end
endmodule
