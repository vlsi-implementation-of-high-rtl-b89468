// tb_current_block_memory: writes a random 16x16 block byte by byte and reads
// it back as rows of eight pixels at every row and at columns 0..8.
module tb_current_block_memory;
  import eds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [7:0] waddr = '0;
  pix_t wdata = '0;
  logic [3:0] rd_row = '0, rd_col = '0;
  pixrow_t rd_data;
  pix_t img [BLK][BLK];
  int checks = 0, failures = 0;

  current_block_memory dut (.*);

  initial begin
    for (int a = 0; a < BLK * BLK; a++) begin
      img[a / BLK][a % BLK] = 8'($urandom);
      we <= 1'b1; waddr <= 8'(a); wdata <= img[a / BLK][a % BLK];
      @(posedge clk);
    end
    we <= 1'b0;
    @(posedge clk);
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c <= BLK - PPC; c++) begin
        rd_row = 4'(r); rd_col = 4'(c);
        #1;
        for (int k = 0; k < PPC; k++) begin
          checks++;
          if (rd_data[k] != img[r][c + k]) begin
            failures++;
            $display("FAIL row %0d col %0d", r, c + k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
