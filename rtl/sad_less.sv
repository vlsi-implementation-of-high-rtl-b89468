// sad_less: W-bit "a < b" magnitude comparator built as a tree.
//
// W one-bit less cells (lcmp1bit) compare the bits of a and b; log2(W)
// levels of combining cells (lcmp2bit) merge neighbouring fields, the upper
// field taking precedence, into a single lt / ne pair. W must be a power of
// two. Building the minimum comparator from these one-bit and two-bit less
// cells follows the published comparator; the tree arrangement is this
// implementation's. Purely combinational.
module sad_less #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         lt,
  output logic         ne
);
  localparam int unsigned L = $clog2(W);

  // Level k (W >> k nodes) starts at index 2*W - 2*(W >> k): all levels are
  // packed into one vector, the root last.
  logic [2*W-2:0] t_lt, t_ne;

  for (genvar i = 0; i < W; i++) begin : g_leaf
    lcmp1bit u_l1 (.a(a[i]), .b(b[i]), .lt(t_lt[i]), .ne(t_ne[i]));
  end

  for (genvar k = 1; k <= L; k++) begin : g_lvl
    localparam int unsigned IN_BASE  = 2*W - 2*(W >> (k-1));
    localparam int unsigned OUT_BASE = 2*W - 2*(W >> k);
    for (genvar n = 0; n < (W >> k); n++) begin : g_node
      lcmp2bit u_l2 (
        .hi_lt(t_lt[IN_BASE + 2*n + 1]), .hi_ne(t_ne[IN_BASE + 2*n + 1]),
        .lo_lt(t_lt[IN_BASE + 2*n]),     .lo_ne(t_ne[IN_BASE + 2*n]),
        .lt(t_lt[OUT_BASE + n]),         .ne(t_ne[OUT_BASE + n])
      );
    end
  end

  assign lt = t_lt[2*W-2];
  assign ne = t_ne[2*W-2];
endmodule
