// tb_lcmp2bit: the less combining cell must turn the one-bit results of the
// two bits of every pair of two-bit values into the two-bit a < b and a != b.
module tb_lcmp2bit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic hi_lt, hi_ne, lo_lt, lo_ne, lt, ne;
  int checks = 0, failures = 0;
  lcmp2bit dut (.hi_lt, .hi_ne, .lo_lt, .lo_ne, .lt, .ne);
  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        hi_lt = (a / 2) < (b / 2); hi_ne = (a / 2) != (b / 2);
        lo_lt = (a % 2) < (b % 2); lo_ne = (a % 2) != (b % 2);
        @(posedge clk);
        checks++;
        if (lt != (a < b) || ne != (a != b)) begin
          failures++;
          $display("FAIL a=%0d b=%0d", a, b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
