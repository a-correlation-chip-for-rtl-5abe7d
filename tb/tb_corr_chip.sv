// tb_corr_chip: end-to-end test of the convolution chip at its default sizes.
//
// A behavioural source memory returns, one cycle after each read, a pixel
// that is a fixed hash of its address; a behavioural result memory records
// every write. The test loads 64 random masks through the host port, then
// runs programs in 2D and 1D mode whose steps include unit moves in all four
// directions, zero moves, diagonal moves and long jumps, ending with HALT.
// A reference model walks the same program and computes every expected
// result and its address. It also checks the rate: with unit steps one 2D
// result every 8 cycles, in 1D mode one result every cycle, and no stall
// cycles; jumps must produce stalls. A slow host that lets the queue run dry,
// a mask reload between runs and a restart are exercised as well. Each
// mechanism is counted and one that never happened is a failure.
module tb_corr_chip;
  import cc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               host_cs = 0, host_we = 0;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_wdata = '0, host_rdata;
  addr_t din_addr, dout_addr;
  logic  din_rd, dout_we;
  pix_t  din_data;
  res_t  dout_data;

  corr_chip dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- external memories ----------------
  function automatic pix_t pix_of(addr_t a);
    logic [31:0] h;
    h = (32'(a) + 32'h1234) * 32'h9E3779B1;
    h = h ^ (h >> 15);
    return pix_t'(h[15:0]);
  endfunction

  always_ff @(posedge clk) if (din_rd) din_data <= pix_of(din_addr);

  res_t got_data [$];
  addr_t got_addr [$];
  int    got_cyc [$];
  always @(posedge clk) if (rst_n && dout_we) begin
    got_data.push_back(dout_data);
    got_addr.push_back(dout_addr);
    got_cyc.push_back(cyc);
  end

  // ---------------- host ----------------
  task automatic hwrite(logic [12:0] a, logic [15:0] d);
    @(negedge clk);
    host_cs = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_cs = 0; host_we = 0;
  endtask

  task automatic hread(logic [12:0] a, output logic [15:0] d);
    @(negedge clk);
    host_cs = 1; host_we = 0; host_addr = a;
    @(negedge clk);
    host_cs = 0;
    d = host_rdata;
  endtask

  function automatic logic [12:0] ra(reg_e r);
    return {1'b1, 8'd0, r};
  endfunction

  logic signed [7:0] cf [64][8][8];

  task automatic load_masks(int seed);
    for (int m = 0; m < 64; m++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          cf[m][r][c] = 8'($urandom());
          hwrite({1'b0, 6'(m), 3'(r), 3'(c)}, {8'd0, cf[m][r][c]});
        end
  endtask

  // ---------------- reference model ----------------
  int unsigned IN_BASE = 20'h01000, IN_PITCH = 300;
  int unsigned OUT_BASE = 20'h80000, OUT_W = 20, OUT_P = 64;

  res_t  exp_data [$];
  addr_t exp_addr [$];

  function automatic addr_t out_addr_of(int k);
    return addr_t'(OUT_BASE + (k / OUT_W) * OUT_P + (k % OUT_W));
  endfunction

  task automatic model(instr_t prog [$], int x0, int y0, bit mode2d);
    coord_t x = coord_t'(x0), y = coord_t'(y0);
    int k = 0;
    exp_data.delete(); exp_addr.delete();
    foreach (prog[n]) begin
      if (is_halt(prog[n])) break;
      x = x + step(prog[n].xneg, prog[n].xvec);
      y = y + step(prog[n].yneg, prog[n].yvec);
      begin
        res_t tot = 0;
        for (int j = 0; j < 8; j++) begin
          res_t d = 0;
          for (int i = 0; i < 8; i++) begin
            addr_t a = addr_t'(IN_BASE + int'(coord_t'(y + coord_t'(j))) * IN_PITCH
                               + int'(coord_t'(x + coord_t'(i))));
            d += res_t'(pix_of(a)) * res_t'(cf[prog[n].mask][j][i]);
          end
          tot += d;
          if (!mode2d) begin
            exp_data.push_back(d); exp_addr.push_back(out_addr_of(k)); k++;
          end
        end
        if (mode2d) begin
          exp_data.push_back(tot); exp_addr.push_back(out_addr_of(k)); k++;
        end
      end
    end
  endtask

  function automatic instr_t mk(int dx, int dy, int m);
    instr_t i;
    i.xneg = dx < 0; i.yneg = dy < 0;
    i.xvec = 4'(dx < 0 ? -dx : dx);
    i.yvec = 4'(dy < 0 ? -dy : dy);
    i.mask = 6'(m);
    return i;
  endfunction

  localparam instr_t HALT = 16'hC000;

  // mechanism counters
  int n_unit = 0, n_neg = 0, n_diag = 0, n_jump = 0, n_zero = 0, n_halt = 0;
  int n_stall_runs = 0, n_nostall_runs = 0, n_1d = 0, n_2d = 0, n_dry = 0;
  int n_flip = 0, n_reload = 0, n_restart = 0;
  always @(posedge clk) if (dut.flip) n_flip++;

  // Runs one program; pushes instructions whenever the queue has room.
  // 'slow' inserts long pauses so that the queue runs empty.
  task automatic run(instr_t prog [$], int x0, int y0, bit mode2d, bit slow,
                     output int stalls, output int first_out, output int last_out);
    logic [15:0] st;
    int idx = 0, guard;
    int n0 = got_data.size();
    model(prog, x0, y0, mode2d);
    hwrite(ra(R_X0), 16'(x0));
    hwrite(ra(R_Y0), 16'(y0));
    hwrite(ra(R_CTRL), {14'd0, mode2d, 1'b1});
    guard = 0;
    while (idx < prog.size()) begin
      hread(ra(R_STATUS), st);
      if (!st[2]) begin
        hwrite(ra(R_INSTR), prog[idx]);
        idx++;
        if (slow && idx % 5 == 0) begin
          repeat (120) @(negedge clk);
          hread(ra(R_STATUS), st);
          if (st[15:8] == 0 && st[0]) n_dry++;
        end
      end
    end
    do begin
      hread(ra(R_STATUS), st);
      guard++;
    end while (!st[1] && guard < 100000);
    check(st[1] && !st[0], "program halted");
    n_halt++;
    hread(ra(R_STALLS), st);
    stalls = int'(st);
    // compare results
    check(got_data.size() - n0 == exp_data.size(),
          $sformatf("result count %0d expected %0d", got_data.size() - n0, exp_data.size()));
    foreach (exp_data[k]) begin
      if (n0 + k < got_data.size()) begin
        check(got_data[n0+k] == exp_data[k],
              $sformatf("result %0d = %0d expected %0d", k, got_data[n0+k], exp_data[k]));
        check(got_addr[n0+k] == exp_addr[k],
              $sformatf("result %0d addr %h expected %h", k, got_addr[n0+k], exp_addr[k]));
      end
    end
    first_out = (got_cyc.size() > n0) ? got_cyc[n0] : 0;
    last_out  = (got_cyc.size() > 0) ? got_cyc[$] : 0;
    if (mode2d) n_2d++; else n_1d++;
  endtask

  initial begin
    int s, f, l;
    instr_t p [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    hwrite(ra(R_INBASE_L), 16'(IN_BASE));
    hwrite(ra(R_INBASE_H), 16'(IN_BASE >> 16));
    hwrite(ra(R_INPITCH), 16'(IN_PITCH));
    hwrite(ra(R_OBASE_L), 16'(OUT_BASE));
    hwrite(ra(R_OBASE_H), 16'(OUT_BASE >> 16));
    hwrite(ra(R_OWIDTH), 16'(OUT_W));
    hwrite(ra(R_OPITCH), 16'(OUT_P));
    load_masks(1);

    // 1. 2D, unit steps only (serpentine), must run without stalls at 8
    //    cycles per result once started
    p.delete();
    p.push_back(mk(0, 0, 3));
    for (int n = 0; n < 30; n++) p.push_back(mk(1, 0, n % 64));
    p.push_back(mk(0, 1, 5));
    for (int n = 0; n < 30; n++) p.push_back(mk(-1, 0, (n * 7) % 64));
    p.push_back(mk(0, -1, 9));
    p.push_back(mk(0, 0, 10));
    p.push_back(HALT);
    n_unit += 62; n_neg += 31; n_zero += 2;
    run(p, 40, 50, 1'b1, 1'b0, s, f, l);
    // only the first window waits: its 64 pixels arrive over 64 cycles
    check(s == 64, $sformatf("unit-step stalls %0d expected 64", s));
    check(l - f == 8 * (p.size() - 2), $sformatf("2D rate: %0d cycles for %0d results", l - f, p.size() - 2));
    if (s == 64) n_nostall_runs++;

    // 2. 2D with diagonal moves, zero moves and jumps (stalls expected)
    p.delete();
    p.push_back(mk(0, 0, 1));
    for (int n = 0; n < 40; n++) begin
      int k;
      k = $urandom_range(0, 9);
      if (k < 4)       begin p.push_back(mk(k[0] ? 1 : -1, k[1] ? 1 : -1, $urandom_range(0, 63))); n_diag++; end
      else if (k < 6)  begin p.push_back(mk($urandom_range(0, 30) - 15, $urandom_range(0, 30) - 15, $urandom_range(0, 63))); n_jump++; end
      else if (k < 7)  begin p.push_back(mk(0, 0, $urandom_range(0, 63))); n_zero++; end
      else             begin p.push_back(mk(k[0] ? 1 : 0, k[0] ? 0 : -1, $urandom_range(0, 63))); n_unit++; end
    end
    p.push_back(HALT);
    run(p, 100, 100, 1'b1, 1'b0, s, f, l);
    check(s > 64, $sformatf("irregular program stalls %0d", s));
    if (s > 64) n_stall_runs++;

    // 3. reload some masks and restart, 1D mode with unit steps, slow host
    for (int m = 0; m < 4; m++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          cf[m][r][c] = 8'($urandom());
          hwrite({1'b0, 6'(m), 3'(r), 3'(c)}, {8'd0, cf[m][r][c]});
        end
    n_reload++; n_restart++;
    p.delete();
    p.push_back(mk(0, 0, 0));
    for (int n = 0; n < 24; n++) p.push_back(mk(n % 3 == 0 ? 0 : 1, n % 3 == 0 ? 1 : 0, n % 4));
    p.push_back(HALT);
    run(p, 7, 9, 1'b0, 1'b1, s, f, l);

    // 4. 1D mode, fast host: 8 results per application, one per cycle
    p.delete();
    p.push_back(mk(0, 0, 2));
    for (int n = 0; n < 20; n++) p.push_back(mk(0, 1, 3));
    p.push_back(HALT);
    n_unit += 20;
    run(p, 500, 30, 1'b0, 1'b0, s, f, l);
    check(l - f == 8 * (p.size() - 1) - 1, $sformatf("1D rate: %0d cycles for %0d results", l - f, 8 * (p.size() - 1)));
    check(s == 64, $sformatf("1D unit-step stalls %0d expected 64", s));

    // mechanisms
    check(n_2d > 0 && n_1d > 0, "both modes ran");
    check(n_stall_runs > 0, "stall happened");
    check(n_nostall_runs > 0, "stall-free run happened");
    check(n_dry > 0, "queue ran dry");
    check(n_flip > 0, "cache banks flipped");
    check(n_diag > 0 && n_jump > 0 && n_neg > 0 && n_zero > 0 && n_unit > 0, "all step kinds");
    $display("mechanisms: 2D runs %0d, 1D runs %0d, unit %0d, negative %0d, diagonal %0d, jump %0d, zero %0d, halts %0d, stall runs %0d, stall-free runs %0d, queue dry %0d, bank flips %0d, mask reloads %0d, restarts %0d",
             n_2d, n_1d, n_unit, n_neg, n_diag, n_jump, n_zero, n_halt, n_stall_runs, n_nostall_runs, n_dry, n_flip, n_reload, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
