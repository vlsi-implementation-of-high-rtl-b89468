// tb_pe_array: five PEs share the current pixels and each gets its own
// reference pixels. With a random enable mask each enabled PE must end with
// its own SAD, each disabled PE with zero after the clear, and `busy` must
// fall two clocks after the edge that takes the last beat.
module tb_pe_array;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, clr = 1'b0, in_valid = 1'b0;
  logic [NPE-1:0] en = '0;
  pixrow_t cb = '0;
  pixrow_t rb [NPE];
  sad_t sad [NPE];
  logic busy;
  int checks = 0, failures = 0;
  int exp [NPE];
  pixrow_t c;
  pixrow_t r [NPE];

  pe_array dut (.*);

  initial begin
    for (int p = 0; p < NPE; p++) rb[p] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 16; i++) begin
      int lat;
      en <= (i == 0) ? 5'b11111 : 5'($urandom);
      clr <= 1'b1; @(posedge clk); clr <= 1'b0;
      @(posedge clk);
      for (int p = 0; p < NPE; p++) exp[p] = 0;
      for (int t = 0; t < 32; t++) begin
        for (int k = 0; k < PPC; k++) begin
          c[k] = 8'($urandom);
          for (int p = 0; p < NPE; p++) begin
            r[p][k] = 8'($urandom);
            exp[p] += (c[k] > r[p][k]) ? int'(c[k] - r[p][k]) : int'(r[p][k] - c[k]);
          end
        end
        cb <= c;
        for (int p = 0; p < NPE; p++) rb[p] <= r[p];
        in_valid <= 1'b1;
        @(posedge clk);
      end
      in_valid <= 1'b0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (busy);
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (int'(sad[p]) != (en[p] ? exp[p] : 0)) begin
          failures++;
          $display("FAIL run %0d PE %0d en %0b sad %0d expected %0d", i, p, en[p], sad[p], exp[p]);
        end
      end
      checks++;
      if (en != '0 && lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
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
