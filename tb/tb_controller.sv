// tb_controller: runs programs through the controller with a model queue and
// a model cache loader whose load of instruction n takes D_n cycles (random,
// 0..30). Checks the window origins given to the loader (previous origin plus
// the signed step, cache marked empty only for the first window), that each
// application issues columns 0..7 with the right mask, cache column
// (column + x0) mod 8 and y-offset, that the banks flip in the cycle before
// each application, that a window is handed over exactly when both its load
// and the previous application are done (so loads of up to 8 cycles cause no
// gap), the stall count (D_0 + 1) + sum(max(0, D_n - 7)), i.e. every cycle the
// apply stage sits idle waiting for a load, and the halt.
module tb_controller;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  coord_t x0 = '0, y0 = '0;
  logic [15:0] q_data;
  logic q_empty, q_pop;
  logic ld_ready, ld_start, ld_old_valid, flip;
  coord_t ld_nx, ld_ny, ld_ox, ld_oy;
  logic ap_valid, ap_first, ap_last;
  logic [5:0] ap_mask;
  logic [2:0] ap_col, ap_phys_col, ap_yoff;
  logic running, halted;
  logic [15:0] stalls;
  controller dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d: %s", cyc, s); end
  endtask

  // model queue
  instr_t prog [$];
  int qi = 0;
  bit pause = 0;
  assign q_empty = pause || (qi >= prog.size());
  assign q_data  = (qi < prog.size()) ? prog[qi] : 16'h0;
  always @(posedge clk) if (q_pop) qi <= qi + 1;

  // model loader
  int dly [$];
  int ld_n = 0, busy_left = 0;
  assign ld_ready = (busy_left == 0);
  always @(posedge clk) begin
    if (ld_start) begin
      busy_left <= dly[ld_n];
      ld_n <= ld_n + 1;
    end else if (busy_left > 0) busy_left <= busy_left - 1;
  end

  // expected per application
  int ex_x [$], ex_y [$], ex_m [$];
  int app_n = 0, col_n = 0, app_start [$], start_cyc [$], handoff_cyc [$];
  int n_flip = 0;
  bit prev_flip = 0;

  always @(posedge clk) if (rst_n) begin
    if (ld_start) start_cyc.push_back(cyc);
    if (flip) begin handoff_cyc.push_back(cyc); n_flip++; end
    if (ap_valid) begin
      chk(app_n < ex_m.size(), "extra application");
      if (app_n < ex_m.size()) begin
        chk(ap_col == 3'(col_n) && ap_first == (col_n == 0) && ap_last == (col_n == 7), "column order");
        chk(ap_mask == 6'(ex_m[app_n]), "mask");
        chk(ap_phys_col == 3'(col_n + ex_x[app_n]), "cache column");
        chk(ap_yoff == 3'(ex_y[app_n]), "y offset");
        if (col_n == 0) begin
          chk(prev_flip, "flip before application");
          app_start.push_back(cyc);
        end
      end
      if (col_n == 7) begin col_n = 0; app_n++; end else col_n++;
    end
    prev_flip = flip;
  end

  // loader requests
  int lr_n = 0;
  coord_t lx, ly;
  always @(posedge clk) if (rst_n && ld_start) begin
    chk(ld_ox == lx && ld_oy == ly, "old origin");
    chk(ld_old_valid == (lr_n != 0), "old window valid");
    chk(ld_nx == coord_t'(ex_x[lr_n]) && ld_ny == coord_t'(ex_y[lr_n]),
        $sformatf("new origin %0d,%0d expected %0d,%0d", ld_nx, ld_ny, ex_x[lr_n], ex_y[lr_n]));
    lx = ld_nx; ly = ld_ny;
    lr_n++;
  end

  function automatic instr_t mk(int dx, int dy, int m);
    instr_t i;
    i.xneg = dx < 0; i.yneg = dy < 0;
    i.xvec = 4'(dx < 0 ? -dx : dx); i.yvec = 4'(dy < 0 ? -dy : dy);
    i.mask = 6'(m);
    return i;
  endfunction

  initial begin
    int napps, exp_stalls;
    coord_t x, y;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      napps = 30 + run * 10;
      prog.delete(); dly.delete(); ex_x.delete(); ex_y.delete(); ex_m.delete();
      app_start.delete(); start_cyc.delete(); handoff_cyc.delete();
      x0 = coord_t'($urandom_range(0, 1000)); y0 = coord_t'($urandom_range(0, 1000));
      x = x0; y = y0;
      for (int n = 0; n < napps; n++) begin
        int dx, dy;
        dx = $urandom_range(0, 30) - 15; dy = $urandom_range(0, 30) - 15;
        if (n % 3 != 0) begin dx = dx % 2; dy = 0; end
        prog.push_back(mk(dx, dy, $urandom_range(0, 63)));
        x = x + coord_t'(dx); y = y + coord_t'(dy);
        ex_x.push_back(int'(x)); ex_y.push_back(int'(y)); ex_m.push_back(int'(prog[n].mask));
        dly.push_back((n % 4 == 0) ? $urandom_range(9, 30) : $urandom_range(0, 8));
      end
      prog.push_back(16'hC000);
      qi = 0; ld_n = 0; lr_n = 0; app_n = 0; col_n = 0;
      lx = x0; ly = y0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      // a dry spell in the queue during the second run
      if (run == 1) begin
        repeat (100) @(negedge clk);
        pause = 1;
        repeat (50) @(negedge clk);
        pause = 0;
      end
      while (!halted) @(negedge clk);
      chk(!running, "stopped");
      chk(app_n == napps, $sformatf("%0d applications, expected %0d", app_n, napps));
      // hand-over timing (runs without queue pauses)
      if (run != 1 && handoff_cyc.size() == napps && start_cyc.size() == napps) begin
        exp_stalls = dly[0] + 1;
        for (int n = 0; n < napps; n++) begin
          int h;
          h = start_cyc[n] + 1 + dly[n];
          if (n > 0 && handoff_cyc[n-1] + 8 > h) h = handoff_cyc[n-1] + 8;
          chk(handoff_cyc[n] == h, $sformatf("hand-over %0d at %0d expected %0d", n, handoff_cyc[n], h));
          chk(app_start[n] == handoff_cyc[n] + 1, "application follows hand-over");
          if (n > 0) begin
            chk(start_cyc[n] == handoff_cyc[n-1], "next load starts at hand-over");
            if (dly[n] > 7) exp_stalls += dly[n] - 7;
          end
        end
        chk(int'(stalls) == exp_stalls, $sformatf("stalls %0d expected %0d", stalls, exp_stalls));
      end
    end
    chk(n_flip > 0, "flips seen");
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
