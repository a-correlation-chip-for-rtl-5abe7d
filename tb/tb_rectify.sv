// tb_rectify: image rectification by inverse mapping with sub-pixel
// interpolation, run end to end on the chip at its default sizes.
//
// Every output pixel (u, v) of a 16 x 12 raster image maps back to a source
// point (sx, sy) through a rotation by 4 degrees and a scale of 0.9 about the
// image centre. That point is rounded to 1/8 pixel. Its integer part minus 3
// is the window origin, and its 3+3 fraction bits pick one of the 64 masks.
// Mask (fy, fx) is a Gaussian of standard deviation 1 pixel centred at
// (3 + fx/8, 3 + fy/8) in the 8x8 window:
//     C[j][i] = round(100 * exp(-((i-3-fx/8)^2 + (j-3-fy/8)^2) / 2))
// The program steps from one origin to the next, in raster order of the
// output. The source image is the ramp P(x, y) = 100 x + 37 y.
//
// Checks:
//  - every 2D result equals the exact integer sum;
//  - each result divided by the sum of its mask's coefficients reproduces the
//    ramp at (sx, sy) to within 0.2 pixel;
//  - the stall count equals the first window's 64 pixels plus
//    max(0, F - 8) for every later window that needs F new pixels;
//  - at least 70 % of the steps are stall-free.
module tb_rectify;
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

  localparam int OW = 16, OH = 12;
  localparam int IN_BASE = 4096, IN_PITCH = 256, OUT_BASE = 20'h40000;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic pix_t ramp(int x, int y);
    return pix_t'(100 * x + 37 * y);
  endfunction

  always_ff @(posedge clk)
    if (din_rd) din_data <= ramp((int'(din_addr) - IN_BASE) % IN_PITCH, (int'(din_addr) - IN_BASE) / IN_PITCH);

  res_t  got [$];
  addr_t gota [$];
  always @(posedge clk) if (rst_n && dout_we) begin got.push_back(dout_data); gota.push_back(dout_addr); end

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

  int   cf [64][8][8];
  int   csum [64];
  int   ox [OW*OH], oy [OW*OH], mk [OW*OH];
  real  sxr [OW*OH], syr [OW*OH];

  initial begin
    logic [15:0] st;
    instr_t prog [$];
    int exp_stalls, n_free, guard;
    real th, sc;
    th = 4.0 * 3.14159265358979 / 180.0;
    sc = 0.9;
    // sub-pixel Gaussian masks
    for (int fy = 0; fy < 8; fy++)
      for (int fx = 0; fx < 8; fx++) begin
        int m;
        m = fy * 8 + fx;
        csum[m] = 0;
        for (int j = 0; j < 8; j++)
          for (int i = 0; i < 8; i++) begin
            real dx, dy;
            dx = i - 3 - fx / 8.0; dy = j - 3 - fy / 8.0;
            cf[m][j][i] = int'($rtoi(100.0 * $exp(-(dx * dx + dy * dy) / 2.0) + 0.5));
            csum[m] += cf[m][j][i];
          end
      end
    // inverse map of every output pixel, rounded to 1/8 pixel
    for (int v = 0; v < OH; v++)
      for (int u = 0; u < OW; u++) begin
        int k, x8, y8;
        real du, dv;
        k = v * OW + u;
        du = u - (OW - 1) / 2.0; dv = v - (OH - 1) / 2.0;
        sxr[k] = 40.0 + sc * ($cos(th) * du - $sin(th) * dv);
        syr[k] = 35.0 + sc * ($sin(th) * du + $cos(th) * dv);
        x8 = $rtoi(sxr[k] * 8.0 + 0.5); y8 = $rtoi(syr[k] * 8.0 + 0.5);
        ox[k] = x8 / 8 - 3; oy[k] = y8 / 8 - 3;
        mk[k] = (y8 % 8) * 8 + (x8 % 8);
      end
    // program and expected stall count
    exp_stalls = 64;
    n_free = 0;
    for (int k = 0; k < OW * OH; k++) begin
      instr_t ins;
      int dx, dy, f;
      dx = (k == 0) ? 0 : ox[k] - ox[k-1];
      dy = (k == 0) ? 0 : oy[k] - oy[k-1];
      check(dx >= -15 && dx <= 15 && dy >= -15 && dy <= 15, "step within range");
      ins.xneg = dx < 0; ins.yneg = dy < 0;
      ins.xvec = 4'(dx < 0 ? -dx : dx); ins.yvec = 4'(dy < 0 ? -dy : dy);
      ins.mask = 6'(mk[k]);
      prog.push_back(ins);
      if (k > 0) begin
        int adx, ady;
        adx = dx < 0 ? -dx : dx; ady = dy < 0 ? -dy : dy;
        f = (adx >= 8 || ady >= 8) ? 64 : 64 - (8 - adx) * (8 - ady);
        if (f > 8) exp_stalls += f - 8; else n_free++;
      end
    end
    prog.push_back(16'hC000);

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 64; m++)
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++)
          hwrite({1'b0, 6'(m), 3'(j), 3'(i)}, 16'(cf[m][j][i]));
    hwrite(ra(R_INBASE_L), 16'(IN_BASE));
    hwrite(ra(R_INBASE_H), 16'(IN_BASE >> 16));
    hwrite(ra(R_INPITCH), 16'(IN_PITCH));
    hwrite(ra(R_OBASE_L), 16'(OUT_BASE));
    hwrite(ra(R_OBASE_H), 16'(OUT_BASE >> 16));
    hwrite(ra(R_OWIDTH), 16'(OW));
    hwrite(ra(R_OPITCH), 16'(OW));
    hwrite(ra(R_X0), 16'(ox[0]));
    hwrite(ra(R_Y0), 16'(oy[0]));
    hwrite(ra(R_CTRL), 16'b11);
    foreach (prog[n]) begin
      do hread(ra(R_STATUS), st); while (st[2]);
      hwrite(ra(R_INSTR), prog[n]);
    end
    guard = 0;
    do begin hread(ra(R_STATUS), st); guard++; end while (!st[1] && guard < 100000);
    check(st[1], "halted");
    hread(ra(R_STALLS), st);
    check(int'(st) == exp_stalls, $sformatf("stalls %0d expected %0d", st, exp_stalls));
    check(got.size() == OW * OH, $sformatf("%0d results", got.size()));
    for (int k = 0; k < OW * OH && k < got.size(); k++) begin
      longint e;
      real val, ideal;
      e = 0;
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++)
          e += longint'(cf[mk[k]][j][i]) * longint'(ramp(ox[k] + i, oy[k] + j));
      check(longint'(got[k]) == e, $sformatf("result %0d: %0d expected %0d", k, got[k], e));
      check(gota[k] == addr_t'(OUT_BASE + k), "output address");
      val = real'(got[k]) / real'(csum[mk[k]]);
      ideal = 100.0 * sxr[k] + 37.0 * syr[k];
      check(val - ideal < 0.2 * 137.0 && ideal - val < 0.2 * 137.0,
            $sformatf("interpolated %f ideal %f at output %0d", val, ideal, k));
    end
    check(n_free * 10 >= 7 * (OW * OH - 1), $sformatf("stall-free steps %0d of %0d", n_free, OW * OH - 1));
    $display("rectification: %0d outputs, %0d stall-free steps, %0d stall cycles", OW * OH, n_free, exp_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
