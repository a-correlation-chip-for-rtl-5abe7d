// tb_addr_gen_out: checks the raster output addresses
// out_base + line * out_pitch + col for several line widths and pitches,
// with idle cycles between advances, a restart in the middle of a line and
// wrap-around at 2^20.
module tb_addr_gen_out;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, adv = 0;
  addr_t out_base = '0, addr;
  logic [15:0] out_width = '0, out_pitch = '0;
  addr_gen_out dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int w, p, n;
      addr_t b;
      w = (t == 0) ? 1 : $urandom_range(2, 40);
      p = (t == 1) ? w : $urandom_range(w, 600);
      b = (t == 2) ? 20'hFFFF0 : addr_t'($urandom());
      n = $urandom_range(50, 300);
      @(negedge clk);
      start = 1; out_base = b; out_width = 16'(w); out_pitch = 16'(p);
      @(negedge clk);
      start = 0;
      for (int k = 0; k < n; k++) begin
        checks++;
        if (addr != addr_t'(b + (k / w) * p + (k % w))) begin
          failures++;
          if (failures < 10) $display("FAIL k %0d addr %h", k, addr);
        end
        adv = 1;
        @(negedge clk);
        adv = 0;
        if (k % 4 == 1) @(negedge clk);
      end
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
