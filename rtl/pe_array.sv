// pe_array: the five processing elements working side by side.
//
// All PEs see the same current-block pixels cb; PE p sees the reference
// pixels rb[p] of candidate point p of the search pattern (p = 0 centre,
// 1 = +x, 2 = -x, 3 = +y, 4 = -y). en[p] from the PE array enabler switches a
// PE on for the step. sad[p] is PE p's SAD once `busy` has fallen after the
// last beat. Five PEs is the published array size.
module pe_array
  import eds_pkg::*;
#(
  parameter int unsigned N = NPE
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic [N-1:0]   en,
  input  logic           in_valid,
  input  pixrow_t        cb,
  input  pixrow_t        rb  [N],
  output sad_t           sad [N],
  output logic           busy
);
  logic [N-1:0] pe_busy;

  for (genvar p = 0; p < N; p++) begin : g_pe
    processing_element u_pe (
      .clk(clk), .rst_n(rst_n), .clr(clr), .en(en[p]),
      .in_valid(in_valid), .cb(cb), .rb(rb[p]),
      .sad(sad[p]), .busy(pe_busy[p])
    );
  end

  assign busy = |pe_busy;
endmodule
