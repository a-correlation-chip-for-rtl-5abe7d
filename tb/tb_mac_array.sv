// tb_mac_array: drives back-to-back applications (8 columns each) with
// random pixels, coefficients and y-offsets, with gaps between some, and
// checks that the 8 row dot products appear on the result bus in window row
// order (window row j comes from multiplier (j + yoff) mod 8), one per cycle,
// starting the cycle after the application's last column, with bus_first on
// the first and bus_last on the eighth.
module tb_mac_array;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, first = 0, last = 0;
  logic [2:0] yoff = '0;
  pix_t pix [8];
  coef_t coef [8];
  mac_t bus_data;
  logic bus_valid, bus_first, bus_last;
  mac_array dut (.*);
  int checks = 0, failures = 0;
  longint expq [$];
  int expc [$];
  int cyc = 0, nbus = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && bus_valid) begin
    longint e;
    int c;
    e = expq.pop_front();
    c = expc.pop_front();
    checks++;
    if (longint'(bus_data) != e || cyc != c ||
        bus_first != (nbus % 8 == 0) || bus_last != (nbus % 8 == 7)) begin
      failures++;
      if (failures < 10) $display("FAIL bus %0d expected %0d at %0d/%0d", bus_data, e, cyc, c);
    end
    nbus++;
  end

  initial begin
    int n_exp = 0;
    for (int k = 0; k < 8; k++) begin pix[k] = '0; coef[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 100; g++) begin
      longint d [8];
      logic [2:0] yo;
      int lastc;
      yo = 3'($urandom());
      for (int k = 0; k < 8; k++) d[k] = 0;
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        en = 1; first = (c == 0); last = (c == 7); yoff = yo;
        for (int k = 0; k < 8; k++) begin
          pix[k] = pix_t'($urandom()); coef[k] = coef_t'($urandom());
          d[k] += longint'(pix[k]) * longint'(coef[k]);
        end
        lastc = cyc;
      end
      for (int j = 0; j < 8; j++) begin
        expq.push_back(d[(j + yo) % 8]);
        expc.push_back(lastc + 1 + j);
        n_exp++;
      end
      if (g % 6 == 5) begin
        @(negedge clk); en = 0; first = 0; last = 0;
        repeat ($urandom_range(0, 10)) @(negedge clk);
      end
    end
    @(negedge clk); en = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (nbus != n_exp) begin failures++; $display("FAIL %0d bus values, expected %0d", nbus, n_exp); end
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
