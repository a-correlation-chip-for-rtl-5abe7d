// tb_switching_stage: for every shift and random coefficient columns, checks
// that mask row r arrives at output (r + shift) mod 8.
module tb_switching_stage;
  import cc_pkg::*;
  coef_t coef_in [8], coef_out [8];
  logic [2:0] shift;
  switching_stage dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < 8; r++) coef_in[r] = coef_t'($urandom());
      shift = 3'(n);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (coef_out[(r + n) % 8] != coef_in[r]) begin
          failures++;
          if (failures < 10) $display("FAIL shift %0d row %0d", n % 8, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
