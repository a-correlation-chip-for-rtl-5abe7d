// addr_gen_in: the data-in address generator (cache loader).
//
// On 'start' it is given the origin (nx, ny) of the next window and the
// origin (ox, oy) of the window already in the cache (old_valid = 0 when the
// cache holds nothing). A pixel (i, j) of the new window is already cached
// when it also lies inside the old window; all others are fetched. The set
// of missing pixels is a KN*KN bit mask; every cycle, starting in the cycle of
// 'start', the lowest set bit is taken, its external address
//     in_base + (ny + j) * in_pitch + (nx + i)      (modulo 2^20)
// is driven on din_addr with din_rd, and the bit is cleared. A move of one
// pixel in x or y thus fetches KN pixels in KN cycles, a diagonal move
// 2*KN-1, and a jump of KN or more all KN*KN.
//
// External memory timing (a choice of this design): the pixel of an address
// driven with din_rd in cycle t is on din_data in cycle t + IN_LAT (IN_LAT >= 1;
// a synchronous SRAM gives 1). The cache cell of each fetch travels along an
// IN_LAT-stage delay line and comes out as wr_en/wr_row/wr_col together with
// the pixel. 'ready' is high when nothing is left to issue and at most the
// pixel arriving in this cycle is outstanding, so the window can be handed
// over in this cycle (the cache includes that last write in the hand-over).
// ready looks only at the load already under way, not at a 'start' in the
// same cycle, so a new load may be started in the cycle of a hand-over.
// in_base and in_pitch must stay constant while a window is loaded.
module addr_gen_in
  import cc_pkg::*;
#(
  parameter int unsigned N      = KN,
  parameter int unsigned IN_LAT = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  coord_t               nx,
  input  coord_t               ny,
  input  coord_t               ox,
  input  coord_t               oy,
  input  logic                 old_valid,
  input  addr_t                in_base,
  input  logic [15:0]          in_pitch,
  output logic                 ready,
  output addr_t                din_addr,
  output logic                 din_rd,
  output logic                 wr_en,
  output logic [$clog2(N)-1:0] wr_row,
  output logic [$clog2(N)-1:0] wr_col
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned NN = N * N;

  logic [NN-1:0] need, need_init, need_cur;
  coord_t        cx, cy, cx_cur, cy_cur;

  // Which pixels of the new window the old window does not cover.
  always_comb begin
    logic signed [COORD_W-1:0] dx, dy;
    dx = $signed(nx - ox);
    dy = $signed(ny - oy);
    for (int j = 0; j < int'(N); j++)
      for (int i = 0; i < int'(N); i++)
        need_init[j*N+i] = !(old_valid &&
                             (int'(dx) + i >= 0) && (int'(dx) + i < int'(N)) &&
                             (int'(dy) + j >= 0) && (int'(dy) + j < int'(N)));
  end

  assign need_cur = start ? need_init : need;
  assign cx_cur   = start ? nx : cx;
  assign cy_cur   = start ? ny : cy;

  // Lowest pending pixel.
  logic [$clog2(NN)-1:0] pick;
  always_comb begin
    pick = '0;
    for (int b = int'(NN) - 1; b >= 0; b--)
      if (need_cur[b]) pick = ($clog2(NN))'(b);
  end

  coord_t px, py;
  assign px = cx_cur + coord_t'(pick[LN-1:0]);
  assign py = cy_cur + coord_t'(pick[2*LN-1:LN]);

  assign din_rd   = |need_cur;
  assign din_addr = in_base + addr_t'(py) * addr_t'(in_pitch) + addr_t'(px);

  // delay line carrying the cache cell of each fetch
  logic [IN_LAT-1:0]         dl_v;
  logic [IN_LAT-1:0][LN-1:0] dl_r, dl_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      need <= '0;
      cx   <= '0;
      cy   <= '0;
      dl_v <= '0;
      dl_r <= '0;
      dl_c <= '0;
    end else begin
      need <= need_cur;
      if (din_rd) need[pick] <= 1'b0;
      cx      <= cx_cur;
      cy      <= cy_cur;
      dl_v[0] <= din_rd;
      dl_r[0] <= py[LN-1:0];
      dl_c[0] <= px[LN-1:0];
      for (int s = 1; s < int'(IN_LAT); s++) begin
        dl_v[s] <= dl_v[s-1];
        dl_r[s] <= dl_r[s-1];
        dl_c[s] <= dl_c[s-1];
      end
    end
  end

  localparam logic [IN_LAT-1:0] EARLY = {IN_LAT{1'b1}} >> 1;

  assign wr_en  = dl_v[IN_LAT-1];
  assign wr_row = dl_r[IN_LAT-1];
  assign wr_col = dl_c[IN_LAT-1];
  assign ready  = !(|need) && !(|(dl_v & EARLY));
endmodule
