// tb_instr_fifo: random pushes and pops against a queue model, including
// pushes when full and pops when empty (both ignored), simultaneous push and
// pop, and clear. Checks head word, empty, full and level every cycle.
module tb_instr_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, pop = 0;
  logic [15:0] wdata = '0, rdata;
  logic empty, full;
  logic [4:0] level;
  instr_fifo dut (.*);
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  int nfull = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = (n / 300) % 2 ? 70 : 30;
      @(negedge clk);
      checks++;
      if (level != 5'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 16) ||
          (q.size() > 0 && rdata != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL n %0d level %0d model %0d", n, level, q.size());
      end
      if (full) nfull++;
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) < 100 - bias);
      clear = (n % 1000 == 999);
      wdata = 16'($urandom());
      @(posedge clk);
      if (clear) q.delete();
      else begin
        logic do_pop;
        do_pop = pop && q.size() > 0;
        if (push && q.size() < 16) q.push_back(wdata);
        if (do_pop) void'(q.pop_front());
      end
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
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
