// final_acc: the final accumulator behind the result bus.
//
// In 2D mode it adds the KN row dot products of one window (one per cycle,
// framed by in_first/in_last) in a feedback register and delivers the OUT_W-bit
// 2D convolution result the cycle after in_last, so one output every KN
// cycles. In 1D mode the adder is bypassed and every dot product is delivered,
// sign-extended to OUT_W bits, one cycle after it arrives: one output per
// cycle. The result is registered.
//
// The adder with feedback register, its 1D bypass and the 27/30-bit widths
// follow the architecture; the registered output is a choice of this design.
module final_acc
  import cc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic mode_2d,
  input  mac_t in_data,
  input  logic in_valid,
  input  logic in_first,
  input  logic in_last,
  output res_t out_data,
  output logic out_valid
);
  res_t acc, sum;
  always_comb sum = (in_first ? res_t'(0) : acc) + res_t'(in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (mode_2d) begin
          acc <= sum;
          if (in_last) begin
            out_data  <= sum;
            out_valid <= 1'b1;
          end
        end else begin
          out_data  <= res_t'(in_data);
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
