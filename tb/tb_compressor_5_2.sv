// tb_compressor_5_2: exhaustive check over all 128 input patterns of
// a3 + a4 + a5 + a6 + a7 + cin1 + cin2 = sum + 2*(cout + cout1 + cout2), and
// that cout1 depends on a3..a5 only (it is their majority).
module tb_compressor_5_2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a3, a4, a5, a6, a7, cin1, cin2, sum, cout, cout1, cout2;
  int checks = 0, failures = 0;
  compressor_5_2 dut (.*);
  initial begin
    for (int i = 0; i < 128; i++) begin
      int tot;
      {cin2, cin1, a7, a6, a5, a4, a3} = 7'(i);
      tot = $countones(i);
      @(posedge clk);
      checks++;
      if (int'(sum) + 2 * (int'(cout) + int'(cout1) + int'(cout2)) != tot ||
          cout1 != (int'(a3) + int'(a4) + int'(a5) >= 2)) begin
        failures++;
        $display("FAIL in=%07b sum=%0b cout=%0b cout1=%0b cout2=%0b", i[6:0], sum, cout, cout1, cout2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
