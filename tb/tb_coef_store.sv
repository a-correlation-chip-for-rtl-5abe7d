// tb_coef_store: fills all 4096 coefficient bytes in random order with random
// values, then reads every mask column and compares each of its 8 entries
// with the byte written at {mask, row, col}. Checks the one-cycle read
// latency and that a read in progress is not disturbed by host writes.
module tb_coef_store;
  import cc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [11:0] wr_addr = '0;
  logic [7:0]  wr_data = '0;
  logic [5:0]  rd_mask = '0;
  logic [2:0]  rd_col = '0;
  coef_t rd_data [8];
  coef_store dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] ref_mem [4096];

  initial begin
    int perm [4096];
    for (int a = 0; a < 4096; a++) perm[a] = a;
    perm.shuffle();
    for (int n = 0; n < 4096; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 12'(perm[n]); wr_data = 8'($urandom());
      ref_mem[perm[n]] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int m = 0; m < 64; m++)
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        rd_en = 1; rd_mask = 6'(m); rd_col = 3'(c);
        // a concurrent write elsewhere must not matter
        wr_en = 1; wr_addr = {6'(m + 1), 3'(c), 3'(c)}; wr_data = ref_mem[{6'(m + 1), 3'(c), 3'(c)}];
        @(negedge clk);
        rd_en = 0; wr_en = 0;
        for (int r = 0; r < 8; r++) begin
          checks++;
          if (rd_data[r] != coef_t'(ref_mem[{6'(m), 3'(r), 3'(c)}])) begin
            failures++;
            if (failures < 10) $display("FAIL mask %0d row %0d col %0d: %0d", m, r, c, rd_data[r]);
          end
        end
        // holds its value while rd_en is low
        @(negedge clk);
        checks++;
        if (rd_data[0] != coef_t'(ref_mem[{6'(m), 3'd0, 3'(c)}])) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
