// eds_me_top: Enhanced Diamond Search (EDS) block motion estimator.
//
// Finds the motion vector of one 16x16 current block inside a 32x32 reference
// search area (displacements -8..+8 in x and y) by a cross-diamond search:
// a large cross diamond (centre and four points at distance 2) walks towards
// the minimum SAD until the minimum sits at its centre, then a small cross
// diamond (four points at distance 1) refines the result.
//
// Structure: current and reference block memories; a data-fetch initializer
// that works out each candidate block's address; a data-fetch unit that
// streams eight pixels per clock from each memory; an array of five
// processing elements (one per pattern point) that accumulate the SADs in
// 32 clocks; a PE array enabler that switches on only the PEs of new,
// in-range points; a comparator that keeps the minimum SAD and its motion
// vector; and the timing and control FSM.
//
// Use: pulse `start`; while `accept_input` is high write the 256 current
// pixels (address row*16+col) and the 1024 reference pixels (row*32+col),
// then raise `load_done`. When `done` pulses, `mv`, `min_sad` and `position`
// (pattern point of the last winner) are valid and stay until the next block.
// `points` counts the SADs computed for the block and `steps` the large
// pattern steps. Writes outside `accept_input` are ignored.
module eds_me_top
  import eds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        load_done,
  input  logic        cur_we,
  input  logic [7:0]  cur_waddr,
  input  pix_t        cur_wdata,
  input  logic        ref_we,
  input  logic [9:0]  ref_waddr,
  input  pix_t        ref_wdata,
  output logic        accept_input,
  output logic        busy,
  output logic        done,
  output mv_pair_t    mv,
  output sad_t        min_sad,
  output logic [2:0]  position,
  output logic [7:0]  points,
  output logic [7:0]  steps
);
  state_e   state;
  ctrl_t    cs;
  mv_pair_t centre;
  logic     last_valid, prev_valid;
  pt_e      last_dir, prev_dir;
  pt_e      cmp_pos;
  logic     sad_ready;

  logic [NPE-1:0] en, en_next;
  coord_t   base_row [NPE];
  coord_t   base_col [NPE];
  logic [2:0] n_points;
  logic [5:0] n_cycles;

  logic [$clog2(BLK)-1:0] cur_row, cur_col;
  pixrow_t  cur_data;
  coord_t   ref_row  [NPE];
  coord_t   ref_col  [NPE];
  pixrow_t  ref_data [NPE];

  logic     di_valid, fetch_busy, pe_busy;
  pixrow_t  di_cb;
  pixrow_t  di_rb [NPE];
  sad_t     sad [NPE];

  control_unit u_ctrl (
    .clk, .rst_n, .start, .load_done, .sad_ready,
    .cmp_pos, .cmp_mv(mv),
    .state, .cs, .centre,
    .last_valid, .last_dir, .prev_valid, .prev_dir,
    .accept_input, .done, .steps
  );

  current_block_memory u_cur (
    .clk, .we(cur_we && accept_input), .waddr(cur_waddr), .wdata(cur_wdata),
    .rd_row(cur_row), .rd_col(cur_col), .rd_data(cur_data)
  );

  reference_block_memory u_ref (
    .clk, .we(ref_we && accept_input), .waddr(ref_waddr), .wdata(ref_wdata),
    .rd_row(ref_row), .rd_col(ref_col), .rd_data(ref_data)
  );

  pe_array_enabler u_en (
    .clk, .rst_n, .clr(cs.clr), .init(cs.init), .first(cs.first), .scdp(cs.scdp), .centre,
    .last_valid, .last_dir, .prev_valid, .prev_dir,
    .en, .en_next
  );

  data_fetch_initializer u_dfi (
    .clk, .rst_n, .clr(cs.clr), .init(cs.init), .scdp(cs.scdp), .centre, .en(en_next),
    .base_row, .base_col, .n_points, .n_cycles
  );

  data_fetch_unit u_dfu (
    .clk, .rst_n, .clr(cs.clr), .start(cs.fetch), .n_cycles,
    .base_row, .base_col,
    .cur_row, .cur_col, .cur_data,
    .ref_row, .ref_col, .ref_data,
    .di_valid, .di_cb, .di_rb, .busy(fetch_busy)
  );

  pe_array u_pes (
    .clk, .rst_n, .clr(cs.clr), .en, .in_valid(di_valid),
    .cb(di_cb), .rb(di_rb), .sad, .busy(pe_busy)
  );

  sad_comparator u_cmp (
    .clk, .rst_n, .cmp(cs.cmp), .scdp(cs.scdp), .centre, .en, .sad,
    .min_sad, .pos(cmp_pos), .mv
  );

  assign sad_ready = !fetch_busy && !pe_busy;
  assign busy      = (state != S0_CLEAR) && (state != S1_DI);
  assign position  = cmp_pos;

  // Search points evaluated for the current block.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  points <= '0;
    else if (accept_input)       points <= '0;
    else if (cs.fetch)           points <= points + 8'(n_points);
  end
endmodule
