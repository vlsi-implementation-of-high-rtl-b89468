// tb_lcmp1bit: exhaustive test of the one-bit less cell (a < b, a != b).
module tb_lcmp1bit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a, b, lt, ne;
  int checks = 0, failures = 0;
  lcmp1bit dut (.a, .b, .lt, .ne);
  initial begin
    for (int i = 0; i < 4; i++) begin
      a = i[1]; b = i[0];
      @(posedge clk);
      checks++;
      if (lt != (int'(a) < int'(b)) || ne != (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b", a, b);
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
