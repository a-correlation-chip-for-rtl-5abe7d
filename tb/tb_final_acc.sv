// tb_final_acc: in 2D mode sends groups of 8 random 27-bit values (including
// the largest and smallest) and checks the 30-bit sum, delivered once per
// group one cycle after 'last'; in 1D mode checks that each value comes out
// sign-extended one cycle after it went in.
module tb_final_acc;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mode_2d = 1, in_valid = 0, in_first = 0, in_last = 0;
  mac_t in_data = '0;
  res_t out_data;
  logic out_valid;
  final_acc dut (.*);
  int checks = 0, failures = 0;
  longint expq [$];
  int nout = 0, n_sent = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e;
    e = expq.pop_front();
    nout++;
    checks++;
    if (longint'(out_data) != e) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d expected %0d", out_data, e);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 100; g++) begin
      automatic longint s = 0;
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        in_valid = 1; in_first = (k == 0); in_last = (k == 7);
        in_data = (g == 0) ? mac_t'(27'h3FFFFFF) : (g == 1) ? mac_t'(27'h4000000) : mac_t'($urandom());
        s += longint'(in_data);
      end
      expq.push_back(s);
      n_sent++;
      if (g % 5 == 0) begin @(negedge clk); in_valid = 0; in_first = 0; in_last = 0; end
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk); mode_2d = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      in_valid = (k % 9 != 4); in_first = (k % 8 == 0); in_last = (k % 8 == 7);
      in_data = mac_t'($urandom());
      if (in_valid) begin expq.push_back(longint'(in_data)); n_sent++; end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nout != n_sent || expq.size() != 0) begin
      failures++;
      $display("FAIL outputs %0d, %0d left", nout, expq.size());
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
