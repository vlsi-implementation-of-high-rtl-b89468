// current_block_memory: holds the BLK x BLK (16x16) block being coded.
//
// One byte write port (address = row * BLK + column) loads the block. The read
// port returns PPC (8) horizontally adjacent pixels of row rd_row starting at
// column rd_col, without a clock (the data-fetch unit registers them). The
// size is the published one; the port widths are this implementation's.
module current_block_memory
  import eds_pkg::*;
#(
  parameter int unsigned SIDE = BLK
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(SIDE*SIDE)-1:0]  waddr,
  input  pix_t                          wdata,
  input  logic [$clog2(SIDE)-1:0]       rd_row,
  input  logic [$clog2(SIDE)-1:0]       rd_col,
  output pixrow_t                       rd_data
);
  localparam int unsigned AW = $clog2(SIDE);

  pix_t mem [SIDE][SIDE];

  always_ff @(posedge clk)
    if (we) mem[waddr[2*AW-1:AW]][waddr[AW-1:0]] <= wdata;

  always_comb
    for (int k = 0; k < PPC; k++)
      rd_data[k] = mem[rd_row][AW'(rd_col + AW'(k))];
endmodule
