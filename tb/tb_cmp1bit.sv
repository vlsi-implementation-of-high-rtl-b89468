// tb_cmp1bit: exhaustive test of the one-bit comparator cell against the
// definitions less / differs / greater of two bits.
module tb_cmp1bit;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic c, r;
  cmp3_t o;
  int checks = 0, failures = 0;
  cmp1bit dut (.c, .r, .o);
  initial begin
    for (int i = 0; i < 4; i++) begin
      c = i[1]; r = i[0];
      @(posedge clk);
      checks++;
      if (o.le != (int'(c) < int'(r)) || o.lg != (int'(c) > int'(r)) || o.ne != (c != r)) begin
        failures++;
        $display("FAIL c=%0b r=%0b le=%0b ne=%0b lg=%0b", c, r, o.le, o.ne, o.lg);
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
