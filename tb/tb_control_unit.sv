// tb_control_unit: drives the timing and control FSM through whole blocks.
// The bench plays the datapath: after each fetch strobe it holds sad_ready
// low for 36 clocks, and it answers each compare with a scripted winning
// position and the matching motion vector. For several scripts (immediate
// centre hit, straight moves, turns) it checks the state sequence
// S0 S1 (S2 S3 S4 S5)* S6 S7 S8 S9 S0, one-clock states, one fetch and one
// compare strobe per search step, the clear strobe in S5, the small-pattern
// flag only in S6..S9, the first-step flag only in the first step, input
// acceptance only in S1, the centre and the last two move directions after
// every move, the step count and the single-clock `done`.
module tb_control_unit;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, start = 1'b0, load_done = 1'b0;
  logic sad_ready;
  pt_e cmp_pos = PT_C;
  mv_pair_t cmp_mv = '0;
  state_e state;
  ctrl_t cs;
  mv_pair_t centre;
  logic last_valid, prev_valid, accept_input, done;
  pt_e last_dir, prev_dir;
  logic [7:0] steps;
  int checks = 0, failures = 0;
  int busy_cnt = 0;

  control_unit dut (.*);

  always @(posedge clk) begin
    if (cs.fetch) busy_cnt <= 36;
    else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign sad_ready = (busy_cnt == 0);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic expect_state(state_e s, string where);
    check(state == s, $sformatf("%s: state %0d expected %0d", where, state, s));
  endtask

  // Runs one block whose large-pattern steps are won by script[0..n-1]; the
  // last entry must be PT_C.
  task automatic run_block(pt_e script [$]);
    int cx = 0, cy = 0, fetches = 0, cmps = 0, k = 0, ld = -1, pd = -1;
    @(negedge clk);
    expect_state(S0_CLEAR, "idle");
    check(cs.clr && !accept_input, "S0 strobes");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_state(S1_DI, "after start");
    check(accept_input && !done, "S1 accepts input");
    repeat (3) @(negedge clk);
    expect_state(S1_DI, "S1 waits for load_done");
    load_done = 1'b1;
    @(negedge clk);
    load_done = 1'b0;
    foreach (script[i]) begin
      int wait_cyc = 0;
      expect_state(S2_HPHASE, $sformatf("step %0d start", i));
      check(cs.init && !cs.scdp && !accept_input, "S2 strobes");
      check(cs.first == (i == 0), "first-step flag");
      @(negedge clk);
      expect_state(S3_HSAD, "S3");
      check(cs.fetch, "fetch strobe on S3 entry");
      fetches++;
      @(negedge clk);
      while (state == S3_HSAD) begin
        check(!cs.fetch, "second fetch strobe");
        wait_cyc++;
        @(negedge clk);
      end
      // 36 clocks with sad_ready low, then one clock in which it is seen high
      check(wait_cyc == 37, $sformatf("S3 lasted %0d clocks after the fetch, expected 37", wait_cyc));
      expect_state(S4_HCMP, "S4");
      check(cs.cmp, "compare strobe");
      cmps++;
      cmp_pos = script[i];
      cmp_mv.x = mv_t'(cx + 2 * dx_of(script[i]));
      cmp_mv.y = mv_t'(cy + 2 * dy_of(script[i]));
      @(negedge clk);
      expect_state(S5_HDONE, "S5");
      check(cs.clr && !cs.cmp, "S5 clears");
      @(negedge clk);
      if (script[i] != PT_C) begin
        cx += 2 * dx_of(script[i]); cy += 2 * dy_of(script[i]);
        pd = ld; ld = int'(script[i]);
        check(int'(centre.x) == cx && int'(centre.y) == cy, "centre after a move");
        check(last_valid && int'(last_dir) == ld, "last direction");
        check(prev_valid == (pd >= 0) && (pd < 0 || int'(prev_dir) == pd), "previous direction");
      end
      k++;
    end
    expect_state(S6_VPHASE, "S6");
    check(cs.init && cs.scdp && !cs.first, "S6 strobes");
    @(negedge clk);
    expect_state(S7_VSAD, "S7");
    check(cs.fetch && cs.scdp, "S7 fetch");
    fetches++;
    @(negedge clk);
    while (state == S7_VSAD) @(negedge clk);
    expect_state(S8_VCMP, "S8");
    check(cs.cmp && cs.scdp, "S8 compare");
    cmps++;
    @(negedge clk);
    expect_state(S9_FINISH, "S9");
    check(done, "done in S9");
    check(int'(steps) == k, $sformatf("steps %0d expected %0d", steps, k));
    check(fetches == k + 1 && cmps == k + 1, "strobe counts");
    @(negedge clk);
    expect_state(S0_CLEAR, "back to S0");
    check(!done, "done lasts one clock");
  endtask

  initial begin
    pt_e s [$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    s = '{PT_C};                                run_block(s);
    s = '{PT_XP, PT_C};                         run_block(s);
    s = '{PT_XP, PT_XP, PT_YN, PT_YN, PT_C};    run_block(s);
    s = '{PT_YP, PT_XN, PT_YP, PT_XP, PT_C};    run_block(s);
    s = '{PT_XN, PT_XN, PT_XN, PT_XN, PT_C};    run_block(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
