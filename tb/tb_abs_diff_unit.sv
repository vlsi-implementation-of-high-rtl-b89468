// tb_abs_diff_unit: exhaustive test over all 65536 pixel pairs of |C - R| and
// of the not-equal flag, and of the XOR-array outputs (the smaller operand
// inverted).
module tb_abs_diff_unit;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  pix_t c, r, a, b, absd;
  logic ne;
  int checks = 0, failures = 0;
  abs_diff_unit dut (.c, .r, .a, .b, .ne, .absd);
  initial begin
    for (int i = 0; i < 65536; i++) begin
      int ci, ri, d;
      ci = i / 256; ri = i % 256;
      c = pix_t'(ci); r = pix_t'(ri);
      #1;
      d = (ci > ri) ? ci - ri : ri - ci;
      checks++;
      if (int'(absd) != d || ne != (ci != ri) ||
          a != ((ci < ri) ? ~c : c) || b != ((ci > ri) ? ~r : r)) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d r=%0d absd=%0d ne=%0b", ci, ri, absd, ne);
      end
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
