// tb_compressor_array: the four output rows must add up to the sum of the
// eight operands. Corner cases (all zero, all 255, one operand set) and
// 20000 random operand sets.
module tb_compressor_array;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  pixrow_t op;
  logic [10:0] s, c0, c1, c2;
  int checks = 0, failures = 0;
  compressor_array dut (.op, .sum_row(s), .cy_row(c0), .cy1_row(c1), .cy2_row(c2));
  task automatic try_it();
    int exp = 0;
    for (int k = 0; k < 8; k++) exp += int'(op[k]);
    #1;
    checks++;
    if (int'(s) + int'(c0) + int'(c1) + int'(c2) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL op=%h rows sum %0d expected %0d", op,
                                  int'(s) + int'(c0) + int'(c1) + int'(c2), exp);
    end
  endtask
  initial begin
    op = '0; try_it();
    op = '1; try_it();
    for (int k = 0; k < 8; k++) begin op = '0; op[k] = 8'hff; try_it(); end
    for (int i = 0; i < 20000; i++) begin
      for (int k = 0; k < 8; k++) op[k] = 8'($urandom);
      try_it();
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
