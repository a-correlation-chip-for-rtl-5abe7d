// image_cache: the 8x8 image window cache with its ping/pong banks.
//
// Source pixel (x, y) of the current window lives in cell (row y mod KN,
// column x mod KN), so a window that moves by one pixel reuses 56 of its 64
// pixels and only the x-offset of the window has to be handled by the column
// address. The cache is KN physical row RAMs; each holds two banks, the
// virtual RAMs A and B, of KN pixels. A per-cell bit 'sel' names the bank
// that is readable; the other bank of that cell is writable. New pixels for
// the next window are written into the writable bank (marking the cell
// 'pend') while the current window is still being read from the readable
// banks. 'flip' hands the newly written cells over: their readable bank
// toggles, so at any time some areas of A and some of B are readable.
//
// Read: rd_col selects one physical column; rd_data[k] is the pixel of
// physical row k, registered (valid the cycle after rd_en). Write: one pixel
// per cycle into cell (wr_row, wr_col) of its writable bank. flip takes effect
// from the next cycle: a read in the flip cycle still sees the old banks, and
// a write in the flip cycle is handed over with the other pending cells, so
// the last pixel of a window may arrive in the cycle the window is handed
// over. Each cell may be written once between flips.
//
// The two virtual RAMs with moving readable and writable areas follow the
// architecture; the per-cell bank select and the hand-over timing are choices
// of this design.
module image_cache
  import cc_pkg::*;
#(
  parameter int unsigned N = KN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_row,
  input  logic [$clog2(N)-1:0] wr_col,
  input  pix_t                 wr_data,
  input  logic                 flip,
  input  logic                 rd_en,
  input  logic [$clog2(N)-1:0] rd_col,
  output pix_t                 rd_data [N]
);
  // bank[b][row][col]
  pix_t bank [2][N][N];
  logic [N-1:0][N-1:0] sel, pend, wr_cell;

  always_comb begin
    wr_cell = '0;
    if (wr_en) wr_cell[wr_row][wr_col] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) bank[!sel[wr_row][wr_col]][wr_row][wr_col] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= '0;
      pend <= '0;
    end else begin
      if (flip) begin
        sel  <= sel ^ pend ^ wr_cell;
        pend <= '0;
      end else begin
        pend <= pend | wr_cell;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int k = 0; k < int'(N); k++)
        rd_data[k] <= bank[sel[k][rd_col]][k][rd_col];
  end

  a_one_write_per_cell: assert property (@(posedge clk) disable iff (!rst_n)
                                          !(wr_en && pend[wr_row][wr_col]))
    else $error("image_cache: cell written twice before a flip");
endmodule
