// tb_eds_me_top: end-to-end test of the EDS motion estimator at its default
// size (16x16 block, 32x32 search area, five PEs).
//
// For each test block the bench builds a reference area and a current block,
// loads both through the write ports, runs the search and compares the motion
// vector, its SAD, the number of SADs computed and the number of large-pattern
// steps with a behavioural model of the same search written with plain loops.
// Images are either a smooth bright blob (the current block is a displaced copy,
// so the search walks several steps, can reach the edge of the range and turn)
// or random noise (the search usually stops at once). It also checks that each
// search step streams the block in exactly 32 clocks, and counts how often the
// mechanisms of the search happen: an immediate centre hit, a straight move
// with three new points, a turn with two new points, a point ignored for lying
// outside the range, a small-pattern winner off and at the centre. Finally it
// writes random data while the estimator is idle and reruns the last block
// without loading: the result must not change.
module tb_eds_me_top;
  import eds_pkg::*;

  localparam int NBLK = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, load_done = 1'b0;
  logic cur_we = 1'b0, ref_we = 1'b0;
  logic [7:0] cur_waddr = '0;
  logic [9:0] ref_waddr = '0;
  pix_t cur_wdata = '0, ref_wdata = '0;
  logic accept_input, busy, done;
  mv_pair_t mv;
  sad_t min_sad;
  logic [2:0] position;
  logic [7:0] points, steps;

  eds_me_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_centre_first = 0, n_move3 = 0, n_move2 = 0, n_ignored = 0;
  int n_scdp_off = 0, n_scdp_centre = 0, n_gated = 0;
  int fetch_cycles = 0;
  int n_ignored_writes = 0;

  int refimg [WIN][WIN];
  int curimg [BLK][BLK];

  // ---------------- behavioural model ----------------
  function automatic int sad_at(int x, int y);
    int s = 0;
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        int d = curimg[r][c] - refimg[8 + y + r][8 + x + c];
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic bit inside_range(int x, int y);
    return x >= -8 && x <= 8 && y >= -8 && y <= 8;
  endfunction

  // point order: 0 centre, 1 +x, 2 -x, 3 +y, 4 -y
  function automatic int ox(int p); return p == 1 ? 1 : p == 2 ? -1 : 0; endfunction
  function automatic int oy(int p); return p == 3 ? 1 : p == 4 ? -1 : 0; endfunction
  function automatic int opp(int p); return p == 1 ? 2 : p == 2 ? 1 : p == 3 ? 4 : 3; endfunction

  int m_x, m_y, m_sad, m_points, m_steps;

  task automatic model();
    int cx = 0, cy = 0, best, bpos, lastd = -1, prevd = -1;
    bit first = 1;
    m_points = 0; m_steps = 0;
    forever begin
      int nnew = 0;
      m_steps++;
      if (first) begin best = sad_at(0, 0); m_points++; end
      else best = m_sad;
      bpos = 0;
      for (int p = 1; p < 5; p++) begin
        int x = cx + 2 * ox(p), y = cy + 2 * oy(p);
        bit en = inside_range(x, y);
        if (lastd >= 0 && p == opp(lastd)) en = 0;
        if (prevd >= 0 && p == opp(prevd)) en = 0;
        if (!inside_range(x, y)) n_ignored++;
        if (en) begin
          int s = sad_at(x, y);
          nnew++; m_points++;
          if (s < best) begin best = s; bpos = p; end
        end
      end
      if (nnew < 4) n_gated++;
      if (lastd >= 0 && prevd < 0 && nnew == 3) n_move3++;
      if (lastd >= 0 && prevd >= 0 && lastd != prevd && nnew == 2) n_move2++;
      if (lastd >= 0 && prevd >= 0 && lastd == prevd && nnew == 3) n_move3++;
      m_sad = best;
      if (bpos == 0) begin
        if (first) n_centre_first++;
        break;
      end
      cx += 2 * ox(bpos); cy += 2 * oy(bpos);
      prevd = lastd; lastd = bpos; first = 0;
    end
    bpos = 0;
    for (int p = 1; p < 5; p++) begin
      int x = cx + ox(p), y = cy + oy(p);
      if (inside_range(x, y)) begin
        int s = sad_at(x, y);
        m_points++;
        if (s < best) begin best = s; bpos = p; end
      end else n_ignored++;
    end
    if (bpos == 0) n_scdp_centre++; else n_scdp_off++;
    m_x = cx + ox(bpos); m_y = cy + oy(bpos); m_sad = best;
  endtask

  // ---------------- stimulus ----------------
  task automatic make_images(int kind);
    int dx = int'($urandom_range(0, 16)) - 8;
    int dy = int'($urandom_range(0, 16)) - 8;
    int br = int'($urandom_range(4, 27)), bc = int'($urandom_range(4, 27));
    int rad2 = int'($urandom_range(40, 400));
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        if (kind == 0) refimg[r][c] = int'($urandom_range(0, 255));
        else begin
          int d2 = (r - br) * (r - br) + (c - bc) * (c - bc);
          int v = 250 - (d2 * 250) / rad2;
          refimg[r][c] = (v < 5 ? 5 : v) + int'($urandom_range(0, 2));
        end
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        curimg[r][c] = (kind == 0) ? int'($urandom_range(0, 255)) : refimg[8 + dy + r][8 + dx + c];
  endtask

  task automatic load_and_run(output int cycles);
    @(negedge clk); start <= 1'b1;
    @(negedge clk); start <= 1'b0;
    while (!accept_input) @(negedge clk);
    for (int a = 0; a < BLK * BLK; a++) begin
      cur_we <= 1'b1; cur_waddr <= 8'(a); cur_wdata <= pix_t'(curimg[a / BLK][a % BLK]);
      @(negedge clk);
    end
    cur_we <= 1'b0;
    for (int a = 0; a < WIN * WIN; a++) begin
      ref_we <= 1'b1; ref_waddr <= 10'(a); ref_wdata <= pix_t'(refimg[a / WIN][a % WIN]);
      @(negedge clk);
    end
    ref_we <= 1'b0;
    load_done <= 1'b1;
    @(negedge clk); load_done <= 1'b0;
    cycles = 0;
    fetch_cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  always @(posedge clk) if (dut.u_dfu.active) fetch_cycles++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      make_images(b % 4 == 0 ? 0 : 1);
      model();
      load_and_run(cyc);
      check(int'(mv.x) == m_x && int'(mv.y) == m_y,
            $sformatf("blk %0d mv (%0d,%0d) expected (%0d,%0d)", b, mv.x, mv.y, m_x, m_y));
      check(int'(min_sad) == m_sad, $sformatf("blk %0d sad %0d expected %0d", b, min_sad, m_sad));
      check(int'(points) == m_points, $sformatf("blk %0d points %0d expected %0d", b, points, m_points));
      check(int'(steps) == m_steps, $sformatf("blk %0d steps %0d expected %0d", b, steps, m_steps));
      check(fetch_cycles == FETCH_CYC * (m_steps + 1),
            $sformatf("blk %0d fetch cycles %0d expected %0d", b, fetch_cycles, FETCH_CYC * (m_steps + 1)));
      if (b < 6)
        $display("block %0d: mv (%0d,%0d) sad %0d points %0d steps %0d search cycles %0d",
                 b, int'(mv.x), int'(mv.y), min_sad, points, steps, cyc);
    end
    // Writes while the estimator is not accepting input must be ignored: a
    // block run without reloading must repeat the last block's result.
    begin
      mv_pair_t mv0;
      sad_t sad0;
      int cyc2;
      mv0 = mv; sad0 = min_sad;
      for (int a = 0; a < WIN * WIN; a++) begin
        @(negedge clk);
        ref_we <= 1'b1; ref_waddr <= 10'(a); ref_wdata <= 8'($urandom);
        cur_we <= 1'b1; cur_waddr <= 8'(a); cur_wdata <= 8'($urandom);
      end
      @(negedge clk);
      ref_we <= 1'b0; cur_we <= 1'b0;
      check(!accept_input, "estimator accepting input while idle");
      @(negedge clk); start <= 1'b1;
      @(negedge clk); start <= 1'b0;
      while (!accept_input) @(negedge clk);
      load_done <= 1'b1;
      @(negedge clk); load_done <= 1'b0;
      cyc2 = 0;
      while (!done) begin @(negedge clk); cyc2++; end
      check(mv == mv0 && min_sad == sad0, "writes outside the input state changed the memories");
      n_ignored_writes++;
    end
    $display("mechanisms: centre_first=%0d move3=%0d move2=%0d ignored=%0d gated=%0d scdp_off=%0d scdp_centre=%0d",
             n_centre_first, n_move3, n_move2, n_ignored, n_gated, n_scdp_off, n_scdp_centre);
    check(n_ignored_writes > 0, "write gating not exercised");
    check(n_centre_first > 0, "no immediate centre hit");
    check(n_move3 > 0, "no step with three new points");
    check(n_move2 > 0, "no step with two new points");
    check(n_ignored > 0, "no point outside the range");
    check(n_gated > 0, "no PE switched off");
    check(n_scdp_off > 0, "no small-pattern winner off centre");
    check(n_scdp_centre > 0, "no small-pattern winner at centre");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
