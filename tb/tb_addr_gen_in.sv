// tb_addr_gen_in: for random old/new window origins (unit, diagonal, zero
// and long moves, an empty cache, and coordinates that wrap), checks that the
// generator fetches exactly the pixels of the new window outside the old one,
// each once, one per cycle starting in the cycle of 'start', at address
// in_base + y * in_pitch + x, and that each pixel's cache cell (y mod 8,
// x mod 8) comes back IN_LAT cycles later with wr_en; 'ready' must rise in the
// cycle the last pixel arrives. Run with IN_LAT = 1 and IN_LAT = 3.
module tb_addr_gen_in;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, old_valid = 0;
  coord_t nx = '0, ny = '0, ox = '0, oy = '0;
  addr_t in_base = '0;
  logic [15:0] in_pitch = '0;

  logic  ready [2], din_rd [2], wr_en [2];
  addr_t din_addr [2];
  logic [2:0] wr_row [2], wr_col [2];

  addr_gen_in #(.IN_LAT(1)) dut1 (.clk, .rst_n, .start, .nx, .ny, .ox, .oy, .old_valid,
    .in_base, .in_pitch, .ready(ready[0]), .din_addr(din_addr[0]), .din_rd(din_rd[0]),
    .wr_en(wr_en[0]), .wr_row(wr_row[0]), .wr_col(wr_col[0]));
  addr_gen_in #(.IN_LAT(3)) dut3 (.clk, .rst_n, .start, .nx, .ny, .ox, .oy, .old_valid,
    .in_base, .in_pitch, .ready(ready[1]), .din_addr(din_addr[1]), .din_rd(din_rd[1]),
    .wr_en(wr_en[1]), .wr_row(wr_row[1]), .wr_col(wr_col[1]));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL @%0d: %s", cyc, s);
  endtask

  // per instance: issued addresses with their cycle, arrivals with their cycle
  addr_t iss_a [2][$];
  int    iss_c [2][$];
  int    wr_c [2][$];
  logic [5:0] wr_cell [2][$];
  int    rdy_c [2];
  bit    rdy_seen [2];

  for (genvar g = 0; g < 2; g++) begin : g_mon
    always @(posedge clk) begin
      if (din_rd[g]) begin iss_a[g].push_back(din_addr[g]); iss_c[g].push_back(cyc); end
      if (wr_en[g]) begin wr_c[g].push_back(cyc); wr_cell[g].push_back({wr_row[g], wr_col[g]}); end
      if (ready[g] && !rdy_seen[g] && !start) begin rdy_seen[g] = 1; rdy_c[g] = cyc; end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      int dx, dy, k, sc;
      automatic addr_t exp_a [$];
      automatic logic [5:0] exp_cell [$];
      k = t % 6;
      case (k)
        0: begin dx = 1; dy = 0; end
        1: begin dx = 0; dy = -1; end
        2: begin dx = -1; dy = 1; end
        3: begin dx = 0; dy = 0; end
        default: begin dx = $urandom_range(0, 40) - 20; dy = $urandom_range(0, 40) - 20; end
      endcase
      @(negedge clk);
      ox = (t % 17 == 5) ? 16'hFFFE : coord_t'($urandom_range(0, 2000));
      oy = coord_t'($urandom_range(0, 2000));
      nx = ox + coord_t'(dx); ny = oy + coord_t'(dy);
      old_valid = (t % 10 != 9);
      in_base = addr_t'($urandom()); in_pitch = 16'($urandom_range(8, 2047));
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++) begin
          int ri, rj;
          ri = i + dx; rj = j + dy;
          if (!(old_valid && ri >= 0 && ri < 8 && rj >= 0 && rj < 8)) begin
            coord_t px, py;
            px = nx + coord_t'(i); py = ny + coord_t'(j);
            exp_a.push_back(addr_t'(in_base + addr_t'(py) * addr_t'(in_pitch) + addr_t'(px)));
            exp_cell.push_back({py[2:0], px[2:0]});
          end
        end
      for (int g = 0; g < 2; g++) begin
        iss_a[g].delete(); iss_c[g].delete(); wr_c[g].delete(); wr_cell[g].delete();
        rdy_seen[g] = 0;
      end
      start = 1;
      sc = cyc;
      @(negedge clk);
      start = 0;
      repeat (72) @(negedge clk);
      for (int g = 0; g < 2; g++) begin
        int lat;
        lat = g ? 3 : 1;
        checks++;
        if (iss_a[g].size() != exp_a.size()) fail($sformatf("inst %0d: %0d fetches, expected %0d", g, iss_a[g].size(), exp_a.size()));
        else begin
          logic [5:0] got_sorted [$], exp_sorted [$];
          addr_t ga [$], ea [$];
          ga = iss_a[g]; ea = exp_a;
          ga.sort(); ea.sort();
          checks++;
          if (ga != ea) fail($sformatf("inst %0d: fetched address set differs (dx %0d dy %0d)", g, dx, dy));
          for (int n = 0; n < iss_c[g].size(); n++) begin
            checks++;
            if (iss_c[g][n] != sc + n) fail($sformatf("inst %0d: fetch %0d at cycle %0d", g, n, iss_c[g][n] - sc));
          end
          checks++;
          if (wr_c[g].size() != exp_a.size()) fail("arrival count");
          else for (int n = 0; n < wr_c[g].size(); n++) begin
            checks++;
            if (wr_c[g][n] != iss_c[g][n] + lat) fail("arrival latency");
          end
          got_sorted = wr_cell[g]; exp_sorted = exp_cell;
          got_sorted.sort(); exp_sorted.sort();
          checks++;
          if (got_sorted != exp_sorted) fail("cache cells differ");
          checks++;
          if (exp_a.size() > 0 && !(rdy_seen[g] && rdy_c[g] == sc + exp_a.size() - 1 + lat))
            fail($sformatf("inst %0d: ready at %0d, expected %0d", g, rdy_c[g] - sc, exp_a.size() - 1 + lat));
        end
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
