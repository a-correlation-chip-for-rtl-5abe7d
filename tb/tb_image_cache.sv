// tb_image_cache: random traffic against a model of readable and pending
// cells. Each cycle it may write a new pixel to a cell not yet written since
// the last flip, read a column, and flip (sometimes together with a write).
// Reads must return the readable contents, never a pending pixel, and a read
// in the flip cycle must still see the old contents; after the flip the
// written cells, including one written in the flip cycle, are readable.
module tb_image_cache;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, flip = 0, rd_en = 0;
  logic [2:0] wr_row = '0, wr_col = '0, rd_col = '0;
  pix_t wr_data = '0;
  pix_t rd_data [8];
  image_cache dut (.*);
  int checks = 0, failures = 0;
  pix_t readable [8][8], pending [8][8];
  bit   is_pend [8][8];
  int   nflip_wr = 0;

  initial begin
    pix_t expv [8];
    bit   chk;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initial fill: all 64 cells, then flip
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        wr_en = 1; wr_row = 3'(r); wr_col = 3'(c); wr_data = pix_t'($urandom());
        readable[r][c] = wr_data;
      end
    @(negedge clk);
    wr_en = 0; flip = 1;
    @(negedge clk);
    flip = 0;
    foreach (is_pend[r, c]) is_pend[r][c] = 0;
    chk = 0;
    for (int n = 0; n < 4000; n++) begin
      int r, c;
      @(negedge clk);
      // check the read issued in the previous cycle
      if (chk) for (int k = 0; k < 8; k++) begin
        checks++;
        if (rd_data[k] != expv[k]) begin
          failures++;
          if (failures < 10) $display("FAIL n %0d row %0d: %0d expected %0d", n, k, rd_data[k], expv[k]);
        end
      end
      wr_en = 0; flip = 0; rd_en = 0;
      r = $urandom_range(0, 7); c = $urandom_range(0, 7);
      if (!is_pend[r][c] && $urandom_range(0, 3) != 0) begin
        wr_en = 1; wr_row = 3'(r); wr_col = 3'(c); wr_data = pix_t'($urandom());
      end
      rd_en = ($urandom_range(0, 1) == 1);
      rd_col = 3'($urandom());
      chk = rd_en;
      for (int k = 0; k < 8; k++) expv[k] = readable[k][rd_col];
      flip = ($urandom_range(0, 15) == 0);
      // update the model at the clock edge
      if (wr_en) begin is_pend[r][c] = 1; pending[r][c] = wr_data; end
      if (flip) begin
        if (wr_en) nflip_wr++;
        foreach (is_pend[i, j]) if (is_pend[i][j]) begin
          readable[i][j] = pending[i][j];
          is_pend[i][j] = 0;
        end
      end
    end
    checks++;
    if (nflip_wr == 0) begin failures++; $display("FAIL no write in a flip cycle"); end
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
