// tb_data_fetch_unit: the bench answers the unit's memory addresses with a
// pixel value that encodes the address (current block: row*16+col; reference
// area of PE p: a hash of p, row and column), so every delivered pixel tells
// where it was read. For random base addresses it checks that a burst gives
// exactly 32 valid beats in raster order (row t/2, left or right half), one
// clock after the address, with the right pixels for every PE, and that
// `busy` covers the burst and falls after it. A `clr` in mid-burst must stop it.
module tb_data_fetch_unit;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, clr = 1'b0, start = 1'b0;
  logic [5:0] n_cycles = 6'd32;
  coord_t base_row [NPE];
  coord_t base_col [NPE];
  logic [3:0] cur_row, cur_col;
  pixrow_t cur_data;
  coord_t ref_row [NPE];
  coord_t ref_col [NPE];
  pixrow_t ref_data [NPE];
  logic di_valid, busy;
  pixrow_t di_cb;
  pixrow_t di_rb [NPE];
  int checks = 0, failures = 0;

  data_fetch_unit dut (.*);

  function automatic pix_t refpix(int p, int r, int c);
    return pix_t'(p * 37 + r * 11 + c * 3 + ((r * c) >> 3));
  endfunction

  always_comb begin
    for (int k = 0; k < PPC; k++) begin
      cur_data[k] = pix_t'(int'(cur_row) * 16 + int'(cur_col) + k);
      for (int p = 0; p < NPE; p++)
        ref_data[p][k] = refpix(p, int'(ref_row[p]), int'(ref_col[p]) + k);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int p = 0; p < NPE; p++) begin base_row[p] = '0; base_col[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      int beats, busy_cyc;
      beats = 0;
      busy_cyc = 0;
      for (int p = 0; p < NPE; p++) begin
        base_row[p] = coord_t'($urandom_range(0, 16));
        base_col[p] = coord_t'($urandom_range(0, 16));
      end
      start <= 1'b1;
      @(negedge clk); start <= 1'b0;
            while (busy) begin
        if (di_valid) begin
          int r, c;
          r = beats / 2;
          c = (beats % 2) * 8;
          for (int k = 0; k < PPC; k++) begin
            check(di_cb[k] == pix_t'(r * 16 + c + k), $sformatf("beat %0d cur pixel %0d", beats, k));
            for (int p = 0; p < NPE; p++)
              check(di_rb[p][k] == refpix(p, int'(base_row[p]) + r, int'(base_col[p]) + c + k),
                    $sformatf("beat %0d PE %0d pixel %0d", beats, p, k));
          end
          beats++;
        end
        busy_cyc++;
        @(negedge clk);
      end
      check(beats == 32, $sformatf("burst had %0d beats", beats));
      check(busy_cyc == 33, $sformatf("busy for %0d clocks, expected 33", busy_cyc));
      @(negedge clk);
    end
    // clr stops a burst
    start <= 1'b1; @(negedge clk); start <= 1'b0;
    repeat (5) @(negedge clk);
    clr <= 1'b1; @(negedge clk); clr <= 1'b0;
        check(!busy && !di_valid, "clr did not stop the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
