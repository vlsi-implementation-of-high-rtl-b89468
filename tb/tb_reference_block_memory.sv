// tb_reference_block_memory: writes a random 32x32 area byte by byte and
// reads it back through all five read ports at once, each at its own random
// row and column (columns 0..24 so that eight pixels fit in the row).
module tb_reference_block_memory;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [9:0] waddr = '0;
  pix_t wdata = '0;
  coord_t rd_row [NPE];
  coord_t rd_col [NPE];
  pixrow_t rd_data [NPE];
  pix_t img [WIN][WIN];
  int checks = 0, failures = 0;

  reference_block_memory dut (.*);

  initial begin
    for (int a = 0; a < WIN * WIN; a++) begin
      img[a / WIN][a % WIN] = 8'($urandom);
      we <= 1'b1; waddr <= 10'(a); wdata <= img[a / WIN][a % WIN];
      @(posedge clk);
    end
    we <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      for (int p = 0; p < NPE; p++) begin
        rd_row[p] = 5'($urandom_range(0, 31));
        rd_col[p] = 5'($urandom_range(0, 24));
      end
      #1;
      for (int p = 0; p < NPE; p++)
        for (int k = 0; k < PPC; k++) begin
          checks++;
          if (rd_data[p][k] != img[rd_row[p]][int'(rd_col[p]) + k]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d row %0d col %0d", p, rd_row[p], int'(rd_col[p]) + k);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
