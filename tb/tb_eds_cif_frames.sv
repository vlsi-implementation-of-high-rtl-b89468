// tb_eds_cif_frames: runs the estimator over whole CIF frames (352x288,
// 22 x 18 = 396 blocks of 16x16) and checks the CIF real-time budget.
//
// The reference frame is a smooth synthetic texture (sums of triangle waves).
// Each current frame is that texture shifted by a global motion, with a
// rectangular object that moves differently. For every block the 32x32
// search area is cut from the reference frame around the block, with edge
// pixels repeated outside the frame. The motion vector, SAD and number of
// SADs computed are checked against a behavioural model of the search. Per
// frame the bench counts all clocks, loading included, and checks that 30
// frames fit in one second at 397.84 MHz (13,261,333 clocks per frame). It
// prints the average number of search points per block, the average SAD per
// pixel and the share of blocks that found the true motion.
module tb_eds_cif_frames;
  import eds_pkg::*;

  localparam int FW = 352, FH = 288;
  localparam int NFRAMES = 3;
  localparam longint BUDGET = 13261333;   // 397.84e6 / 30

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
  int refimg [WIN][WIN];
  int curimg [BLK][BLK];
  int m_x, m_y, m_sad, m_points;
  longint clocks = 0;

  always @(posedge clk) clocks++;

  function automatic int tri_wave(int v, int p);
    int m = ((v % (2 * p)) + 2 * p) % (2 * p);
    return (m > p) ? m - p : p - m;
  endfunction

  function automatic int texture(int x, int y);
    int cx, cy;
    cx = (x < 0) ? 0 : (x >= FW) ? FW - 1 : x;
    cy = (y < 0) ? 0 : (y >= FH) ? FH - 1 : y;
    return (tri_wave(cx, 41) * 3 + tri_wave(cy, 31) * 3 + tri_wave(cx + cy, 53) * 2) * 255 / 322;
  endfunction

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
  function automatic int ox(int p); return p == 1 ? 1 : p == 2 ? -1 : 0; endfunction
  function automatic int oy(int p); return p == 3 ? 1 : p == 4 ? -1 : 0; endfunction
  function automatic int opp(int p); return p == 1 ? 2 : p == 2 ? 1 : p == 3 ? 4 : 3; endfunction

  task automatic model();
    int cx = 0, cy = 0, best, bpos, lastd = -1, prevd = -1;
    bit first = 1;
    m_points = 0;
    forever begin
      if (first) begin best = sad_at(0, 0); m_points++; end
      else best = m_sad;
      bpos = 0;
      for (int p = 1; p < 5; p++) begin
        int x = cx + 2 * ox(p), y = cy + 2 * oy(p);
        bit en = inside_range(x, y);
        if (lastd >= 0 && p == opp(lastd)) en = 0;
        if (prevd >= 0 && p == opp(prevd)) en = 0;
        if (en) begin
          int s = sad_at(x, y);
          m_points++;
          if (s < best) begin best = s; bpos = p; end
        end
      end
      m_sad = best;
      if (bpos == 0) break;
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
      end
    end
    m_x = cx + ox(bpos); m_y = cy + oy(bpos); m_sad = best;
  endtask

  task automatic run_block();
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
    while (!done) @(negedge clk);
  endtask

  initial begin
    int gx [NFRAMES] = '{2, -3, 5};
    int gy [NFRAMES] = '{-1, 4, 6};
    repeat (3) @(negedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      longint c0, fclk;
      int tot_points, tot_sad, hits;
      c0 = clocks; tot_points = 0; tot_sad = 0; hits = 0;
      for (int by = 0; by < FH / BLK; by++)
        for (int bx = 0; bx < FW / BLK; bx++) begin
          int X, Y;
          bit obj;
          X = bx * BLK; Y = by * BLK;
          // object: a 96x64 region that moves by (-4, 3) instead
          obj = (X >= 128 && X < 224 && Y >= 96 && Y < 160);
          for (int r = 0; r < BLK; r++)
            for (int c = 0; c < BLK; c++)
              curimg[r][c] = obj ? texture(X + c + 4, Y + r - 3)
                                 : texture(X + c - gx[f], Y + r - gy[f]);
          for (int r = 0; r < WIN; r++)
            for (int c = 0; c < WIN; c++)
              refimg[r][c] = texture(X - 8 + c, Y - 8 + r);
          model();
          run_block();
          checks++;
          if (int'(mv.x) != m_x || int'(mv.y) != m_y || int'(min_sad) != m_sad || int'(points) != m_points) begin
            failures++;
            if (failures < 10)
              $display("FAIL frame %0d block (%0d,%0d): mv (%0d,%0d) sad %0d points %0d, model (%0d,%0d) %0d %0d",
                       f, bx, by, int'(mv.x), int'(mv.y), min_sad, points, m_x, m_y, m_sad, m_points);
          end
          tot_points += int'(points);
          tot_sad += int'(min_sad);
          if (obj ? (m_x == 4 && m_y == -3) : (m_x == -gx[f] && m_y == -gy[f])) hits++;
        end
      fclk = clocks - c0;
      $display("frame %0d: %0d clocks, %0.2f search points/block, SAD/pixel %0.3f, true motion found in %0d of 396 blocks",
               f, fclk, real'(tot_points) / 396.0, real'(tot_sad) / (396.0 * 256.0), hits);
      checks++;
      if (fclk > BUDGET) begin
        failures++;
        $display("FAIL frame %0d needs %0d clocks, budget %0d", f, fclk, BUDGET);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
