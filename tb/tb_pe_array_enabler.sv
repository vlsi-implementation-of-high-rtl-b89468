// tb_pe_array_enabler: random search states (centre anywhere in the range,
// pattern size, first-step flag, last two moves) against the enable rule
// written out in the bench: centre PE only in the first step; an arm only if
// its point is inside +/-8 and, in a large-pattern step, not the arm back to
// the last or the one before last centre. Also checks that `en` holds between
// `init` pulses and that a straight move leaves 3 arms and a turn 2 arms when
// all points are inside the range, and that `clr` switches all PEs off.
module tb_pe_array_enabler;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, clr = 1'b0, init = 1'b0, first = 1'b0, scdp = 1'b0;
  mv_pair_t centre = '0;
  logic last_valid = 1'b0, prev_valid = 1'b0;
  pt_e last_dir = PT_C, prev_dir = PT_C;
  logic [NPE-1:0] en, en_next;
  int checks = 0, failures = 0;
  int offx [NPE] = '{0, 1, -1, 0, 0};
  int offy [NPE] = '{0, 0, 0, 1, -1};
  int oppo [NPE] = '{0, 2, 1, 4, 3};
  int n_straight = 0, n_turn = 0;

  pe_array_enabler dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int x, y, rad, ld, pd;
      bit f, s, lv, pv;
      logic [NPE-1:0] exp;
      x = int'($urandom_range(0, 16)) - 8; y = int'($urandom_range(0, 16)) - 8;
      s = 1'($urandom); f = 1'($urandom); lv = !f && 1'($urandom); pv = lv && 1'($urandom);
      ld = int'($urandom_range(1, 4)); pd = int'($urandom_range(1, 4));
      if (pv && pd == oppo[ld]) pd = ld;    // a move never reverses the previous one
      rad = s ? 1 : 2;
      exp[0] = f;
      for (int p = 1; p < NPE; p++) begin
        int px, py;
        px = x + offx[p] * rad;
        py = y + offy[p] * rad;
        exp[p] = px >= -8 && px <= 8 && py >= -8 && py <= 8;
        if (!s && lv && p == oppo[ld]) exp[p] = 1'b0;
        if (!s && pv && p == oppo[pd]) exp[p] = 1'b0;
      end
      centre.x <= mv_t'(x); centre.y <= mv_t'(y); scdp <= s; first <= f;
      last_valid <= lv; prev_valid <= pv; last_dir <= pt_e'(ld); prev_dir <= pt_e'(pd);
      init <= 1'b1;
      @(negedge clk);
      init <= 1'b0; first <= ~f;
      @(negedge clk);
      checks++;
      if (en != exp) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) s%0d f%0d lv%0d ld%0d pv%0d pd%0d en %b exp %b",
                                    x, y, s, f, lv, ld, pv, pd, en, exp);
      end
      if (!s && lv && x >= -6 && x <= 6 && y >= -6 && y <= 6) begin
        int arms;
        arms = $countones(en[4:1]);
        checks++;
        if (!pv || pd == ld) begin
          n_straight++;
          if (arms != 3) begin failures++; $display("FAIL straight move left %0d arms", arms); end
        end else begin
          n_turn++;
          if (arms != 2) begin failures++; $display("FAIL turn left %0d arms", arms); end
        end
      end
    end
    checks++;
    if (n_straight == 0 || n_turn == 0) failures++;
    // clr switches every PE off
    first <= 1'b1; scdp <= 1'b1; centre <= '0; init <= 1'b1;
    @(negedge clk);
    init <= 1'b0; clr <= 1'b1;
    @(negedge clk);
    clr <= 1'b0;
    checks++;
    if (en != '0) begin failures++; $display("FAIL clr left en %b", en); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
