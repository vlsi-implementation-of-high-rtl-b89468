// tb_compressor_3_2: exhaustive check of a0 + a1 + a2 = sum + 2*cout.
module tb_compressor_3_2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a0, a1, a2, sum, cout;
  int checks = 0, failures = 0;
  compressor_3_2 dut (.a0, .a1, .a2, .sum, .cout);
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a2, a1, a0} = 3'(i);
      @(posedge clk);
      checks++;
      if (int'(sum) + 2 * int'(cout) != int'(a0) + int'(a1) + int'(a2)) begin
        failures++;
        $display("FAIL in=%03b sum=%0b cout=%0b", i[2:0], sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
