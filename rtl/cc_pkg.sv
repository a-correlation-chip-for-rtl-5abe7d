// cc_pkg: shared widths, the instruction format and the host register map of
// the correlation/convolution chip.
//
// Widths that follow the architecture: 16-bit pixels, 8-bit two's complement
// coefficients, 8x8 kernels, 64 masks, 27-bit MAC results (a 16x8 signed
// product summed 8 times), a 30-bit 2D result (eight 27-bit values summed) and
// 20-bit external addresses. Pixels are taken as two's complement so that
// edge-enhanced (differenced) images can be processed; this is a choice of
// this design.
//
// Instruction (16 bits): a mask identifier 0..63, a y step 0..15 and an x step
// 0..15 as in the architecture, plus two direction bits chosen here so that
// scan paths can move left and up:
//   [15] x step negative  [14] y step negative  [13:8] mask id
//   [7:4] y step magnitude [3:0] x step magnitude
// HALT is encoded as both direction bits set with both magnitudes zero (a
// "minus zero" step that otherwise has no meaning).
package cc_pkg;

  localparam int unsigned PIX_W   = 16;
  localparam int unsigned COEF_W  = 8;
  localparam int unsigned KN      = 8;    // kernel / window size
  localparam int unsigned NMASK   = 64;
  localparam int unsigned MAC_W   = 27;
  localparam int unsigned OUT_W   = 30;
  localparam int unsigned ADDR_W  = 20;
  localparam int unsigned COORD_W = 16;   // window origin coordinates
  localparam int unsigned HOST_AW = 13;
  localparam int unsigned HOST_DW = 16;

  typedef logic signed [PIX_W-1:0]  pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [MAC_W-1:0]  mac_t;
  typedef logic signed [OUT_W-1:0]  res_t;
  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic [COORD_W-1:0]       coord_t;

  typedef struct packed {
    logic       xneg;
    logic       yneg;
    logic [5:0] mask;
    logic [3:0] yvec;
    logic [3:0] xvec;
  } instr_t;

  function automatic logic is_halt(instr_t i);
    return i.xneg && i.yneg && (i.xvec == 4'd0) && (i.yvec == 4'd0);
  endfunction

  // Signed step of one axis, as a coordinate increment.
  function automatic coord_t step(logic neg, logic [3:0] mag);
    coord_t m;
    m = coord_t'(mag);
    return neg ? coord_t'(-m) : m;
  endfunction

  // Host address map. host_addr[12] = 0: coefficient byte
  // {mask[5:0], row[2:0], col[2:0]}; host_addr[12] = 1: registers below.
  typedef enum logic [3:0] {
    R_CTRL     = 4'h0,  // w: bit0 start (self clearing), bit1 2D mode
    R_INBASE_L = 4'h1,
    R_INBASE_H = 4'h2,
    R_INPITCH  = 4'h3,
    R_OBASE_L  = 4'h4,
    R_OBASE_H  = 4'h5,
    R_OWIDTH   = 4'h6,
    R_OPITCH   = 4'h7,
    R_X0       = 4'h8,
    R_Y0       = 4'h9,
    R_INSTR    = 4'hA,  // w: push one instruction
    R_STATUS   = 4'hB,  // r: bit0 running, bit1 halted, bit2 queue full, [15:8] queue level
    R_STALLS   = 4'hC   // r: stall cycles of the last run (saturating)
  } reg_e;

  typedef struct packed {
    logic   mode_2d;
    addr_t  in_base;
    logic [15:0] in_pitch;
    addr_t  out_base;
    logic [15:0] out_width;
    logic [15:0] out_pitch;
    coord_t x0;
    coord_t y0;
  } cfg_t;

endpackage
