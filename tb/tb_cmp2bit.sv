// tb_cmp2bit: the combining cell joins two one-bit comparisons into a two-bit
// comparison. All 16 pairs of two-bit values go through two one-bit results
// worked out in the bench; the output must equal the two-bit comparison.
module tb_cmp2bit;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  cmp3_t hi, lo, o;
  int checks = 0, failures = 0;
  cmp2bit dut (.hi, .lo, .o);
  function automatic cmp3_t bitcmp(logic c, logic r);
    cmp3_t t;
    t.le = (int'(c) < int'(r)); t.lg = (int'(c) > int'(r)); t.ne = (c != r);
    return t;
  endfunction
  initial begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        hi = bitcmp(c[1], r[1]);
        lo = bitcmp(c[0], r[0]);
        @(posedge clk);
        checks++;
        if (o.le != (c < r) || o.lg != (c > r) || o.ne != (c != r)) begin
          failures++;
          $display("FAIL c=%0d r=%0d", c, r);
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
