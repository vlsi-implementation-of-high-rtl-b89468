// tb_data_fetch_initializer: for every centre in the search range, both
// pattern sizes and random enable masks, the registered block addresses must
// be (8 + y + dy*radius, 8 + x + dx*radius) for each pattern point, the point
// count the number of enabled PEs and the cycle count 32. Between `init`
// pulses the outputs must hold; `clr` must reset them.
module tb_data_fetch_initializer;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, clr = 1'b0, init = 1'b0, scdp = 1'b0;
  mv_pair_t centre = '0;
  logic [NPE-1:0] en = '0;
  coord_t base_row [NPE];
  coord_t base_col [NPE];
  logic [2:0] n_points;
  logic [5:0] n_cycles;
  int checks = 0, failures = 0;
  int offx [NPE] = '{0, 1, -1, 0, 0};
  int offy [NPE] = '{0, 0, 0, 1, -1};

  data_fetch_initializer dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n <= 1'b1;
    for (int y = -8; y <= 8; y++)
      for (int x = -8; x <= 8; x++)
        for (int s = 0; s < 2; s++) begin
          int rad;
          logic [NPE-1:0] m;
          rad = s ? 1 : 2;
          m = 5'($urandom);
          centre.x <= mv_t'(x); centre.y <= mv_t'(y); scdp <= s[0]; en <= m; init <= 1'b1;
          @(negedge clk);
          init <= 1'b0; centre <= '0; en <= ~m;
          @(negedge clk);
          for (int p = 0; p < NPE; p++) begin
            checks++;
            if (int'(base_row[p]) != ((8 + y + offy[p] * rad) & 31) ||
                int'(base_col[p]) != ((8 + x + offx[p] * rad) & 31)) begin
              failures++;
              $display("FAIL centre (%0d,%0d) rad %0d PE %0d at (%0d,%0d)", x, y, rad, p,
                       base_row[p], base_col[p]);
            end
          end
          checks++;
          if (int'(n_points) != $countones(m) || n_cycles != 6'd32) begin
            failures++;
            $display("FAIL points %0d cycles %0d mask %b", n_points, n_cycles, m);
          end
        end
    clr <= 1'b1;
    @(negedge clk);
    clr <= 1'b0;
    checks++;
    if (n_points != '0 || base_row[1] != '0 || base_col[1] != '0) begin
      failures++;
      $display("FAIL clr did not reset the outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
