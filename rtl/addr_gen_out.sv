// addr_gen_out: the data-out address generator.
//
// Output images are written in raster order: results go to consecutive
// addresses along a line of out_width results, and the next line starts
// out_pitch addresses after the start of the previous one:
//     addr = out_base + line * out_pitch + col          (modulo 2^20)
// 'start' loads the base and restarts at line 0, column 0; 'adv' (one result
// written) steps to the next address. addr is the address for the current
// result and changes the cycle after adv.
//
// The raster order follows the intended output scan; the base/width/pitch
// registers are a choice of this design.
module addr_gen_out
  import cc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       out_base,
  input  logic [15:0] out_width,
  input  logic [15:0] out_pitch,
  input  logic        adv,
  output addr_t       addr
);
  addr_t       line_start;
  logic [15:0] col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_start <= '0;
      col        <= '0;
    end else if (start) begin
      line_start <= out_base;
      col        <= '0;
    end else if (adv) begin
      if (col + 16'd1 >= out_width) begin
        col        <= '0;
        line_start <= line_start + addr_t'(out_pitch);
      end else begin
        col <= col + 16'd1;
      end
    end
  end

  assign addr = line_start + addr_t'(col);
endmodule
