// tb_host_regs: writes every configuration register with random values and
// reads them back (read data one cycle after the read), checks the status
// and stall read-outs, that coefficient writes appear on the coefficient
// port with their byte address, that writes to the instruction register pulse
// instr_push with the word, and that the start bit pulses 'start' for one
// cycle only while bit 1 sets 2D mode.
module tb_host_regs;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_cs = 0, host_we = 0;
  logic [12:0] host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  logic coef_we, start, instr_push;
  logic [11:0] coef_addr;
  logic [7:0] coef_data;
  cfg_t cfg;
  logic [15:0] instr_data;
  logic running = 0, halted = 0, q_full = 0;
  logic [4:0] q_level = '0;
  logic [15:0] stalls = '0;
  host_regs dut (.*);
  int checks = 0, failures = 0;
  int n_start = 0, n_push = 0, n_coef = 0;
  logic [15:0] last_push;
  logic [11:0] last_caddr;
  logic [7:0]  last_cdata;

  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (instr_push) begin n_push++; last_push = instr_data; end
    if (coef_we) begin n_coef++; last_caddr = coef_addr; last_cdata = coef_data; end
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic wr(logic [12:0] a, logic [15:0] d);
    @(negedge clk); host_cs = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_cs = 0; host_we = 0;
  endtask
  task automatic rd(logic [12:0] a, output logic [15:0] d);
    @(negedge clk); host_cs = 1; host_we = 0; host_addr = a;
    @(negedge clk); host_cs = 0; d = host_rdata;
  endtask

  initial begin
    logic [15:0] v [16], d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      for (int r = 1; r <= 9; r++) begin
        v[r] = 16'($urandom());
        wr({1'b1, 8'd0, 4'(r)}, v[r]);
      end
      chk(cfg.in_base == {v[2][3:0], v[1]}, "in_base");
      chk(cfg.in_pitch == v[3], "in_pitch");
      chk(cfg.out_base == {v[5][3:0], v[4]}, "out_base");
      chk(cfg.out_width == v[6] && cfg.out_pitch == v[7], "out width/pitch");
      chk(cfg.x0 == v[8] && cfg.y0 == v[9], "x0/y0");
      for (int r = 1; r <= 9; r++) begin
        logic [15:0] e;
        e = (r == 2 || r == 5) ? {12'd0, v[r][3:0]} : v[r];
        rd({1'b1, 8'd0, 4'(r)}, d);
        chk(d == e, $sformatf("read reg %0d: %h expected %h", r, d, e));
      end
      // status and stalls
      running = 1'($urandom()); halted = 1'($urandom()); q_full = 1'($urandom());
      q_level = 5'($urandom()); stalls = 16'($urandom());
      rd({1'b1, 8'd0, R_STATUS}, d);
      chk(d == {3'd0, q_level, 5'd0, q_full, halted, running}, "status");
      rd({1'b1, 8'd0, R_STALLS}, d);
      chk(d == stalls, "stalls");
      // coefficient byte
      begin
        logic [11:0] a;
        logic [7:0] b;
        int n0;
        a = 12'($urandom()); b = 8'($urandom()); n0 = n_coef;
        wr({1'b0, a}, {8'hAB, b});
        chk(n_coef == n0 + 1 && last_caddr == a && last_cdata == b, "coefficient write");
      end
      // instruction push
      begin
        logic [15:0] w;
        int n0;
        w = 16'($urandom()); n0 = n_push;
        wr({1'b1, 8'd0, R_INSTR}, w);
        chk(n_push == n0 + 1 && last_push == w, "instruction push");
      end
      // control: mode and start
      begin
        int n0;
        logic m;
        m = 1'($urandom()); n0 = n_start;
        wr({1'b1, 8'd0, R_CTRL}, {14'd0, m, 1'b1});
        chk(n_start == n0 + 1 && cfg.mode_2d == m, "start pulse and mode");
        wr({1'b1, 8'd0, R_CTRL}, {14'd0, !m, 1'b0});
        chk(n_start == n0 + 1 && cfg.mode_2d == !m, "mode without start");
        rd({1'b1, 8'd0, R_CTRL}, d);
        chk(d == {14'd0, !m, 1'b0}, "control read");
      end
    end
    // a register write must not touch the coefficient port
    chk(n_coef == 20, "coefficient writes only from coefficient addresses");
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
