// data_fetch_unit: streams the current block and the candidate blocks into
// the PE array.
//
// A pulse on `start` begins a burst of n_cycles beats (32 for a 16x16 block).
// Beat t covers block row t / 2 and the left (t even) or right (t odd) eight
// columns. For every beat it addresses the current block memory and, for each
// PE p, the reference memory at (base_row[p] + row, base_col[p] + column),
// and registers the pixels it gets back (pipeline stage 1): di_cb / di_rb are
// valid the clock after the address, flagged by di_valid. `busy` is high from
// the clock after `start` until the last beat has left the register. `clr`
// stops a burst. The unit is named in the published architecture with its
// duty; the raster order of the beats is this implementation's choice.
module data_fetch_unit
  import eds_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    start,
  input  logic [5:0]              n_cycles,
  input  coord_t                  base_row [NPE],
  input  coord_t                  base_col [NPE],
  // current block memory read port
  output logic [$clog2(BLK)-1:0]  cur_row,
  output logic [$clog2(BLK)-1:0]  cur_col,
  input  pixrow_t                 cur_data,
  // reference memory read ports
  output coord_t                  ref_row [NPE],
  output coord_t                  ref_col [NPE],
  input  pixrow_t                 ref_data [NPE],
  // to the PE array
  output logic                    di_valid,
  output pixrow_t                 di_cb,
  output pixrow_t                 di_rb [NPE],
  output logic                    busy
);
  localparam int unsigned BW   = $clog2(BLK);
  localparam int unsigned SEGS = BLK / PPC;          // beats per row (2)
  localparam int unsigned SW   = $clog2(SEGS);

  logic       active;
  logic [5:0] cnt;
  logic [BW-1:0] row, col;

  always_comb begin
    row = BW'(cnt >> SW);
    col = BW'(cnt[SW-1:0]) * BW'(PPC);
    cur_row = row;
    cur_col = col;
    for (int p = 0; p < NPE; p++) begin
      ref_row[p] = base_row[p] + coord_t'(row);
      ref_col[p] = base_col[p] + coord_t'(col);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      cnt      <= '0;
      di_valid <= 1'b0;
    end else if (clr) begin
      active   <= 1'b0;
      cnt      <= '0;
      di_valid <= 1'b0;
    end else begin
      di_valid <= active;
      if (start) begin
        active <= 1'b1;
        cnt    <= '0;
      end else if (active) begin
        if (cnt == n_cycles - 6'd1) active <= 1'b0;
        cnt <= cnt + 6'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (active) begin
      di_cb <= cur_data;
      for (int p = 0; p < NPE; p++) di_rb[p] <= ref_data[p];
    end
  end

  assign busy = active | di_valid;

  // A new burst may only be started once the previous one has been issued.
  always_ff @(posedge clk)
    if (rst_n && !clr)
      a_no_restart: assert (!(start && active))
        else $error("data fetch started while a burst is running");
endmodule
