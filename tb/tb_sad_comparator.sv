// tb_sad_comparator: random SADs (with many ties) and enable masks. The
// registered minimum, its position and motion vector must match a linear scan
// in the bench where the centre is PE 0's SAD when enabled and otherwise the
// minimum registered before, ties keep the centre and then the earlier arm,
// and the vector is the centre plus the winning offset times the radius.
module tb_sad_comparator;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, cmp = 1'b0, scdp = 1'b0;
  mv_pair_t centre = '0;
  logic [NPE-1:0] en = '0;
  sad_t sad [NPE];
  sad_t min_sad;
  pt_e pos;
  mv_pair_t mv;
  int checks = 0, failures = 0;
  int offx [NPE] = '{0, 1, -1, 0, 0};
  int offy [NPE] = '{0, 0, 0, 1, -1};
  sad_t vals [NPE];

  sad_comparator dut (.*);

  initial begin
    int prev_min;
    for (int p = 0; p < NPE; p++) sad[p] = '0;
    repeat (2) @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    prev_min = int'(min_sad);
    for (int i = 0; i < 3000; i++) begin
      int best, bpos, x, y, s;
      logic [NPE-1:0] m;
      m = (i == 0) ? 5'b11111 : 5'($urandom);
      s = int'($urandom_range(0, 1));
      x = int'($urandom_range(0, 12)) - 6; y = int'($urandom_range(0, 12)) - 6;
      for (int p = 0; p < NPE; p++)
        vals[p] = (i % 3 == 0) ? sad_t'($urandom_range(0, 3)) : sad_t'($urandom);
      best = m[0] ? int'(vals[0]) : prev_min;
      bpos = 0;
      for (int p = 1; p < NPE; p++)
        if (m[p] && int'(vals[p]) < best) begin best = int'(vals[p]); bpos = p; end
      for (int p = 0; p < NPE; p++) sad[p] <= vals[p];
      en <= m; scdp <= s[0]; centre.x <= mv_t'(x); centre.y <= mv_t'(y);
      cmp <= 1'b1;
      @(negedge clk);
      cmp <= 1'b0;
      @(negedge clk);
      checks++;
      if (int'(min_sad) != best || int'(pos) != bpos ||
          int'(mv.x) != x + offx[bpos] * (s ? 1 : 2) || int'(mv.y) != y + offy[bpos] * (s ? 1 : 2)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: min %0d pos %0d exp %0d pos %0d", i, min_sad, pos, best, bpos);
      end
      prev_min = best;
    end
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
