// control_unit: the timing and control finite-state machine.
//
// States follow the published ten-state table:
//   S0 CLEAR     clears the PEs, accumulators, data fetch unit, initializer
//                and enabler (cs.clr); waits for `start`.
//   S1 DI        the external interface writes the current block and the
//                reference area; `load_done` moves on. The centre is set to
//                (0, 0).
//   S2..S5       large cross diamond (radius 2) phase, here the "horizontal"
//                phase: S2 initialises the data fetch and the enabler, S3
//                streams the blocks through the PEs (fetch pulse on entry,
//                leaves when `sad_ready`), S4 lets the comparator register
//                the minimum, S5 clears the PEs, data fetch unit and enabler
//                (cs.clr) and either moves the centre to
//                the winning arm and returns to S2, or, when the minimum is at
//                the centre, goes on.
//   S6..S8       small cross diamond (radius 1) phase, here the "vertical"
//                phase: initialise, compute, compare, once.
//   S9 FINISH    `done` is high for one clock; the comparator outputs hold the
//                motion vector and its SAD. Back to S0.
// The control word `cs` bundles the per-state strobes. The centre, the last
// two move directions and the first-step flag kept here describe the search
// path for the enabler. Mapping the table's horizontal and vertical phases
// onto the large and small patterns is this implementation's reading.
module control_unit
  import eds_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      load_done,
  input  logic      sad_ready,     // fetch finished and PE pipelines empty
  input  pt_e       cmp_pos,
  input  mv_pair_t  cmp_mv,
  output state_e    state,
  output ctrl_t     cs,
  output mv_pair_t  centre,
  output logic      last_valid,
  output pt_e       last_dir,
  output logic      prev_valid,
  output pt_e       prev_dir,
  output logic      accept_input,
  output logic      done,
  output logic [7:0] steps         // large-pattern steps of the last block
);
  logic first;
  logic issued;
  state_e nxt;

  always_comb begin
    nxt = state;
    case (state)
      S0_CLEAR:  if (start)     nxt = S1_DI;
      S1_DI:     if (load_done) nxt = S2_HPHASE;
      S2_HPHASE:                nxt = S3_HSAD;
      S3_HSAD:   if (issued && sad_ready) nxt = S4_HCMP;
      S4_HCMP:                  nxt = S5_HDONE;
      S5_HDONE:  nxt = (cmp_pos == PT_C) ? S6_VPHASE : S2_HPHASE;
      S6_VPHASE:                nxt = S7_VSAD;
      S7_VSAD:   if (issued && sad_ready) nxt = S8_VCMP;
      S8_VCMP:                  nxt = S9_FINISH;
      S9_FINISH:                nxt = S0_CLEAR;
      default:                  nxt = S0_CLEAR;
    endcase
  end

  always_comb begin
    cs       = '0;
    cs.first = first;
    cs.scdp  = (state == S6_VPHASE) || (state == S7_VSAD) || (state == S8_VCMP) ||
               (state == S9_FINISH);
    cs.clr   = (state == S0_CLEAR) || (state == S1_DI) || (state == S5_HDONE);
    cs.init  = (state == S2_HPHASE) || (state == S6_VPHASE);
    cs.fetch = ((state == S3_HSAD) || (state == S7_VSAD)) && !issued;
    cs.cmp   = (state == S4_HCMP) || (state == S8_VCMP);
  end

  assign accept_input = (state == S1_DI);
  assign done         = (state == S9_FINISH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S0_CLEAR;
      first      <= 1'b1;
      issued     <= 1'b0;
      centre     <= '0;
      last_valid <= 1'b0;
      last_dir   <= PT_C;
      prev_valid <= 1'b0;
      prev_dir   <= PT_C;
      steps      <= '0;
    end else begin
      state <= nxt;
      case (state)
        S1_DI: begin
          first      <= 1'b1;
          centre     <= '0;
          last_valid <= 1'b0;
          prev_valid <= 1'b0;
          steps      <= '0;
        end
        S2_HPHASE, S6_VPHASE: issued <= 1'b0;
        S3_HSAD, S7_VSAD:     issued <= 1'b1;
        S4_HCMP:              steps  <= steps + 8'd1;
        S5_HDONE: begin
          first <= 1'b0;
          if (cmp_pos != PT_C) begin
            centre     <= cmp_mv;
            prev_valid <= last_valid;
            prev_dir   <= last_dir;
            last_valid <= 1'b1;
            last_dir   <= cmp_pos;
          end
        end
        default: ;
      endcase
    end
  end

  // The search centre never leaves the search range.
  always_ff @(posedge clk)
    if (rst_n)
      a_mv_range: assert ((int'(centre.x) <= int'(RANGE)) && (int'(centre.x) >= -int'(RANGE)) &&
                          (int'(centre.y) <= int'(RANGE)) && (int'(centre.y) >= -int'(RANGE)))
        else $error("search centre left the search range");
endmodule
