// eds_pkg: constants and types shared by the Enhanced Diamond Search (EDS)
// motion estimator.
//
// The block size (16x16), the reference search area (32x32 bytes) and the
// number of processing elements (5) are the design's published numbers. The
// eight pixels handled per PE per clock follow from the stated 32 clock cycles
// per SAD of a 16x16 block (256 / 32). Widths of the SAD and motion-vector
// fields, the ordering of the five pattern points and the control-word layout
// are this implementation's choices.
package eds_pkg;

  localparam int unsigned BLK      = 16;                 // block is BLK x BLK pixels
  localparam int unsigned WIN      = 32;                 // reference area is WIN x WIN pixels
  localparam int unsigned PPC      = 8;                  // pixels per PE per clock
  localparam int unsigned NPE      = 5;                  // processing elements
  localparam int unsigned RANGE    = (WIN - BLK) / 2;    // motion vector range +/-RANGE (8)
  localparam int unsigned FETCH_CYC = BLK * BLK / PPC;   // clocks to stream one block (32)
  localparam int unsigned SAD_W    = 16;                 // 256 * 255 = 65280 fits in 16 bits
  localparam int unsigned MV_W     = 5;                  // signed, -8..+8
  localparam int unsigned ROW_W    = $clog2(WIN);        // 5-bit row / column of the reference area

  typedef logic [7:0]                  pix_t;
  typedef logic [PPC-1:0][7:0]         pixrow_t;         // PPC horizontally adjacent pixels
  typedef logic [SAD_W-1:0]            sad_t;
  typedef logic signed [MV_W-1:0]      mv_t;
  typedef logic [ROW_W-1:0]            coord_t;

  typedef struct packed {
    mv_t x;   // column displacement, positive to the right
    mv_t y;   // row displacement, positive downwards
  } mv_pair_t;

  // Points of a cross-diamond pattern, one per PE. PT_C is the centre; the
  // four arms lie at +/-2 (LCDP) or +/-1 (SCDP) along x and y.
  typedef enum logic [2:0] {
    PT_C  = 3'd0,
    PT_XP = 3'd1,
    PT_XN = 3'd2,
    PT_YP = 3'd3,
    PT_YN = 3'd4
  } pt_e;

  // States of the timing and control unit (S0..S9).
  typedef enum logic [3:0] {
    S0_CLEAR    = 4'd0,
    S1_DI       = 4'd1,
    S2_HPHASE   = 4'd2,
    S3_HSAD     = 4'd3,
    S4_HCMP     = 4'd4,
    S5_HDONE    = 4'd5,
    S6_VPHASE   = 4'd6,
    S7_VSAD     = 4'd7,
    S8_VCMP     = 4'd8,
    S9_FINISH   = 4'd9
  } state_e;

  // Control signal word (CS) sent by the timing and control unit.
  typedef struct packed {
    logic clr;    // clear PE accumulators, data fetch unit, comparator step state
    logic init;   // data-fetch initializer latches the addresses for a new step
    logic fetch;  // start streaming one block through the PE array
    logic cmp;    // comparator registers the minimum of the step
    logic scdp;   // 1: small pattern (+/-1), 0: large pattern (+/-2)
    logic first;  // first step of the block: the centre is evaluated as well
  } ctrl_t;

  // Outputs of a magnitude-comparator cell: a less than b, a differs from b,
  // a greater than b.
  typedef struct packed {
    logic le;
    logic ne;
    logic lg;
  } cmp3_t;

  // Offset of a pattern point in units of the pattern radius.
  function automatic int dx_of(pt_e p);
    return (p == PT_XP) ? 1 : (p == PT_XN) ? -1 : 0;
  endfunction

  function automatic int dy_of(pt_e p);
    return (p == PT_YP) ? 1 : (p == PT_YN) ? -1 : 0;
  endfunction

  function automatic pt_e opposite(pt_e p);
    case (p)
      PT_XP:   return PT_XN;
      PT_XN:   return PT_XP;
      PT_YP:   return PT_YN;
      PT_YN:   return PT_YP;
      default: return PT_C;
    endcase
  endfunction

endpackage
