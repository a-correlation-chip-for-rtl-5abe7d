// coef_store: the 4 Kbyte on-chip coefficient RAM.
//
// Holds NMASK masks of KN x KN signed 8-bit coefficients (64 x 8 x 8 bytes).
// It is organised as NMASK*KN words of KN coefficients: one word is one
// column of one mask (the 64-bit read path of the architecture), entry [r] of
// the word being the coefficient of mask row r. The host writes one byte per
// cycle at byte address {mask, row, col}; the datapath reads one column per
// cycle. Reads are synchronous: rd_data is valid the cycle after rd_en. The
// two ports are independent, so masks may be reloaded while the chip runs
// (a read of a byte written in the same cycle returns the old value).
//
// Size and the 64-bit read width follow the architecture; the word
// organisation, host byte addressing and synchronous read are choices of
// this design.
module coef_store
  import cc_pkg::*;
#(
  parameter int unsigned NM = NMASK,
  parameter int unsigned N  = KN
) (
  input  logic                        clk,
  input  logic                        wr_en,
  input  logic [$clog2(NM*N*N)-1:0]   wr_addr,   // {mask, row, col}
  input  logic [COEF_W-1:0]           wr_data,
  input  logic                        rd_en,
  input  logic [$clog2(NM)-1:0]       rd_mask,
  input  logic [$clog2(N)-1:0]        rd_col,
  output coef_t                       rd_data [N]
);
  localparam int unsigned LN = $clog2(N);

  logic [N-1:0][COEF_W-1:0] mem [NM*N];

  logic [$clog2(NM*N)-1:0] wword;
  logic [LN-1:0]           wrow;
  assign wword = {wr_addr[$bits(wr_addr)-1 -: $clog2(NM)], wr_addr[LN-1:0]};
  assign wrow  = wr_addr[2*LN-1:LN];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wword][wrow] <= wr_data;
  end

  logic [N-1:0][COEF_W-1:0] q;
  always_ff @(posedge clk) begin
    if (rd_en) q <= mem[{rd_mask, rd_col}];
  end

  always_comb
    for (int r = 0; r < int'(N); r++) rd_data[r] = coef_t'(q[r]);
endmodule
