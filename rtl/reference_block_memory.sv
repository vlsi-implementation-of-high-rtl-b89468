// reference_block_memory: holds the WIN x WIN (32x32) reference search area.
//
// One byte write port (address = row * WIN + column) loads the area. NPORT
// read ports, one per PE, each return PPC (8) horizontally adjacent pixels of
// row rd_row[p] starting at column rd_col[p], without a clock, so all five
// candidate blocks of a search step are read in the same cycle. Column
// indices wrap at WIN; the enabler never switches on a PE whose block would
// leave the area. The size is the published one; the multi-port organisation
// is this implementation's choice.
module reference_block_memory
  import eds_pkg::*;
#(
  parameter int unsigned SIDE  = WIN,
  parameter int unsigned NPORT = NPE
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(SIDE*SIDE)-1:0]  waddr,
  input  pix_t                          wdata,
  input  logic [$clog2(SIDE)-1:0]       rd_row  [NPORT],
  input  logic [$clog2(SIDE)-1:0]       rd_col  [NPORT],
  output pixrow_t                       rd_data [NPORT]
);
  localparam int unsigned AW = $clog2(SIDE);

  pix_t mem [SIDE][SIDE];

  always_ff @(posedge clk)
    if (we) mem[waddr[2*AW-1:AW]][waddr[AW-1:0]] <= wdata;

  always_comb
    for (int p = 0; p < NPORT; p++)
      for (int k = 0; k < PPC; k++)
        rd_data[p][k] = mem[rd_row[p]][AW'(rd_col[p] + AW'(k))];
endmodule
