// tb_mac: feeds back-to-back groups of 8 random pixel/coefficient pairs,
// including the extreme values, with idle gaps between some groups, and checks
// each 27-bit dot product against an integer reference, that res_valid
// pulses exactly once per group in the cycle after 'last', and that the
// result is held until the next group ends.
module tb_mac;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, first = 0, last = 0;
  pix_t pix = '0;
  coef_t coef = '0;
  mac_t res;
  logic res_valid;
  mac dut (.*);
  int checks = 0, failures = 0;
  longint expq [$];
  int nvalid = 0;

  always @(posedge clk) if (rst_n && res_valid) begin
    longint e;
    e = expq.pop_front();
    checks++;
    nvalid++;
    if (longint'(res) != e) begin
      failures++;
      if (failures < 10) $display("FAIL res %0d expected %0d", res, e);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      automatic longint s = 0;
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        en = 1; first = (c == 0); last = (c == 7);
        if (g < 2) begin
          pix = (g == 0) ? pix_t'(-32768) : pix_t'(32767);
          coef = coef_t'(-128);
        end else begin
          pix = pix_t'($urandom()); coef = coef_t'($urandom());
        end
        s += longint'(pix) * longint'(coef);
      end
      expq.push_back(s);
      if (g % 7 == 3) begin
        @(negedge clk);
        en = 0; first = 0; last = 0;
        repeat (3) @(negedge clk);
        // result is held while idle
        checks++;
        if (longint'(res) != s || res_valid) failures++;
      end
    end
    @(negedge clk) en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nvalid != 300) begin
      failures++;
      $display("FAIL %0d results", nvalid);
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
