// tb_stretch: the block-stretching step of correlation stereo in 1D mode,
// run end to end on the chip at its default sizes.
//
// An image block of 8 rows is resampled along x at stretch factors 0.75,
// 0.875, 1.0, 1.125 and 1.25 by linear interpolation. Output column k samples
// x_k = 60 + s * k, rounded to 1/8 pixel. The window origin is the integer
// part of x_k, and the fraction f (0..7) selects mask f. Every row of mask f
// holds the interpolation pair
//     (8 (8 - f), 8 f)
// in its first two taps and zeros elsewhere. Each instruction therefore yields
// the 8 rows of one resampled column, 64 times the interpolated value, one
// result per cycle.
//
// Checks:
//  - every result against the exact interpolation;
//  - the output addresses: one 8-row column per output line;
//  - for the stretch factors with all steps 0 or 1, the 1D rate of one result
//    per cycle from the first to the last result;
//  - the stalls of the 2-pixel steps at s = 1.125 and 1.25.
module tb_stretch;
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

  localparam int NCOL = 12, IN_BASE = 0, IN_PITCH = 512, OUT_BASE = 20'h20000, Y0 = 40;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // a textured source: smooth ramp plus a pseudo-random component
  function automatic pix_t img(int x, int y);
    logic [31:0] h;
    h = 32'(x * 7919 + y * 104729) * 32'h9E3779B1;
    return pix_t'(20 * x - 11 * y + int'(h[23:16]) - 128);
  endfunction

  always_ff @(posedge clk)
    if (din_rd) din_data <= img((int'(din_addr) - IN_BASE) % IN_PITCH, (int'(din_addr) - IN_BASE) / IN_PITCH);

  res_t  got [$];
  addr_t gota [$];
  int    gotc [$];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && dout_we) begin
    got.push_back(dout_data); gota.push_back(dout_addr); gotc.push_back(cyc);
  end

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

  initial begin
    logic [15:0] st;
    int s8 [5] = '{6, 7, 8, 9, 10};   // stretch factor in eighths
    int n_fast = 0, n_stall = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // masks 0..7: linear interpolation pairs; all other taps zero
    for (int f = 0; f < 8; f++)
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++)
          hwrite({1'b0, 6'(f), 3'(j), 3'(i)}, (i == 0) ? 16'(8 * (8 - f)) : (i == 1) ? 16'(8 * f) : 16'd0);
    hwrite(ra(R_INBASE_L), 16'(IN_BASE));
    hwrite(ra(R_INPITCH), 16'(IN_PITCH));
    hwrite(ra(R_OBASE_L), 16'(OUT_BASE));
    hwrite(ra(R_OBASE_H), 16'(OUT_BASE >> 16));
    hwrite(ra(R_OWIDTH), 16'd8);
    hwrite(ra(R_OPITCH), 16'd8);
    foreach (s8[t]) begin
      int xs [NCOL], fs [NCOL], n0, exp_st, guard;
      bit unit;
      unit = 1;
      exp_st = 64;
      for (int k = 0; k < NCOL; k++) begin
        int x8;
        x8 = 60 * 8 + s8[t] * k;
        xs[k] = x8 / 8; fs[k] = x8 % 8;
        if (k > 0 && xs[k] - xs[k-1] > 1) begin
          unit = 0;
          exp_st += 8 * (xs[k] - xs[k-1]) - 8;
        end
      end
      n0 = got.size();
      hwrite(ra(R_X0), 16'(xs[0]));
      hwrite(ra(R_Y0), 16'(Y0));
      hwrite(ra(R_CTRL), 16'b01);   // start, 1D mode
      for (int k = 0; k < NCOL; k++) begin
        instr_t ins;
        ins = '0;
        ins.xvec = 4'((k == 0) ? 0 : xs[k] - xs[k-1]);
        ins.mask = 6'(fs[k]);
        do hread(ra(R_STATUS), st); while (st[2]);
        hwrite(ra(R_INSTR), ins);
      end
      hwrite(ra(R_INSTR), 16'hC000);
      guard = 0;
      do begin hread(ra(R_STATUS), st); guard++; end while (!st[1] && guard < 10000);
      check(st[1], "halted");
      check(got.size() - n0 == 8 * NCOL, $sformatf("s=%0d/8: %0d results", s8[t], got.size() - n0));
      for (int k = 0; k < NCOL; k++)
        for (int j = 0; j < 8; j++) begin
          int idx;
          longint e;
          idx = n0 + k * 8 + j;
          e = 8 * (8 - fs[k]) * longint'(img(xs[k], Y0 + j)) + 8 * fs[k] * longint'(img(xs[k] + 1, Y0 + j));
          if (idx < got.size()) begin
            check(longint'(got[idx]) == e, $sformatf("s=%0d/8 col %0d row %0d: %0d expected %0d", s8[t], k, j, got[idx], e));
            check(gota[idx] == addr_t'(OUT_BASE + k * 8 + j), "output address");
          end
        end
      hread(ra(R_STALLS), st);
      check(int'(st) == exp_st, $sformatf("s=%0d/8: stalls %0d expected %0d", s8[t], st, exp_st));
      if (unit && got.size() - n0 == 8 * NCOL) begin
        check(gotc[got.size() - 1] - gotc[n0] == 8 * NCOL - 1, "1D rate of one result per cycle");
        n_fast++;
      end
      if (!unit) n_stall++;
    end
    check(n_fast > 0 && n_stall > 0, "both stall-free and stalling stretch factors ran");
    $display("stretch: %0d stall-free factors, %0d with 2-pixel steps", n_fast, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
