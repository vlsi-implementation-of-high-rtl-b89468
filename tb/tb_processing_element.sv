// tb_processing_element: streams random 16x16 blocks (32 beats of eight
// pixel pairs) through one PE and compares the accumulated SAD with a sum
// computed in the bench. Checks the pipeline latency (the SAD is complete
// two clocks after the edge that takes the last beat, when `busy` falls),
// that `clr` empties
// the accumulator and that a PE with `en` low keeps its SAD.
module tb_processing_element;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, clr = 1'b0, en = 1'b1, in_valid = 1'b0;
  pixrow_t cb = '0, rb = '0;
  sad_t sad;
  logic busy;
  int checks = 0, failures = 0;

  processing_element dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_block(int gap, output int expected, output int latency);
    pixrow_t c, r;
    expected = 0;
    for (int t = 0; t < 32; t++) begin
      for (int k = 0; k < PPC; k++) begin
        c[k] = 8'($urandom); r[k] = 8'($urandom);
        if (t % 5 == 0) r[k] = c[k];
        expected += (c[k] > r[k]) ? int'(c[k] - r[k]) : int'(r[k] - c[k]);
      end
      cb <= c;
      rb <= r;
      in_valid <= 1'b1;
      @(posedge clk);
      if (gap != 0 && t % 7 == 3 && t < 31) begin in_valid <= 1'b0; @(posedge clk); end
    end
    in_valid <= 1'b0;
    latency = 0;
    do begin @(posedge clk); #1; latency++; end while (busy);
  endtask

  initial begin
    int exp, lat;
    sad_t held;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      clr <= 1'b1; @(posedge clk); clr <= 1'b0;
      #1;
      check(sad == '0, "clr does not zero the SAD");
      run_block(i % 2, exp, lat);
      check(int'(sad) == exp, $sformatf("block %0d sad %0d expected %0d", i, sad, exp));
      check(lat == 2, $sformatf("latency after last beat %0d expected 2", lat));
    end
    // A switched-off PE keeps its value.
    held = sad;
    en <= 1'b0;
    run_block(0, exp, lat);
    check(sad == held, "disabled PE changed its SAD");
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
