// corr_chip: a convolution processor for image warping, rectification and
// correlation-based stereo.
//
// The chip applies 8x8 masks, chosen per output point from 64 stored masks,
// to an 8x8 window that a program walks over a source image in external
// memory. Each program instruction moves the window by a step of up to 15
// pixels in x and y and names the mask to apply (see cc_pkg). Per
// application, 8 MACs each form the dot product of one window row with one
// mask row over 8 cycles (one 128-bit cache column and 64 bits of
// coefficients per cycle); in 1D mode these 8 dot products are the outputs
// (one per cycle), in 2D mode the final accumulator adds them into one 2D
// result every 8 cycles. The window is held in a ping/pong image cache that
// is refilled at one pixel per cycle while it is read, so steps of one pixel
// in x or y run without stalls.
//
// Datapath pipeline: cycle 0 the controller addresses the coefficient store
// and the image cache; cycle 1 the switching stage rotates the coefficients
// and the MACs accumulate; the MAC results then go out over the result bus
// and the final accumulator, and dout_we/dout_addr/dout_data carry each result
// to the output memory. A result leaves 2 cycles after the last column of its
// application (1D: the first row, then one per cycle; 2D: 9 cycles after).
//
// Interfaces:
//   host_*  static-RAM-like port for coefficients, registers, instructions
//           and status (host_regs); reads return data the next cycle.
//   din_*   source image memory: din_addr with din_rd, pixel on din_data
//           IN_LAT cycles later (IN_LAT = 1: synchronous SRAM).
//   dout_*  result memory: dout_data written at dout_addr when dout_we.
// Everything is synchronous to clk with an active-low asynchronous reset.
//
// The block structure, bus widths and output rates follow the original
// architecture; the host register map, the instruction queue, the external
// memory timing and the pipeline latencies are choices of this design.
module corr_chip
  import cc_pkg::*;
#(
  parameter int unsigned IN_LAT   = 1,
  parameter int unsigned Q_DEPTH  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_cs,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata,
  output addr_t              din_addr,
  output logic               din_rd,
  input  pix_t               din_data,
  output addr_t              dout_addr,
  output res_t               dout_data,
  output logic               dout_we
);
  localparam int unsigned LN  = $clog2(KN);
  localparam int unsigned LVL = $clog2(Q_DEPTH + 1);

  // host interface and configuration
  cfg_t        cfg;
  logic        start, coef_we, instr_push;
  logic [11:0] coef_addr;
  logic [COEF_W-1:0] coef_data;
  logic [15:0] instr_data, stalls;
  logic        running, halted;

  // instruction queue
  logic [15:0]    q_data;
  logic           q_empty, q_full, q_pop;
  logic [LVL-1:0] q_level;

  host_regs #(.LVL_W(LVL)) u_host (
    .clk, .rst_n, .host_cs, .host_we, .host_addr, .host_wdata, .host_rdata,
    .coef_we, .coef_addr, .coef_data, .cfg, .start, .instr_push, .instr_data,
    .running, .halted, .q_full, .q_level, .stalls
  );

  instr_fifo #(.W(16), .DEPTH(Q_DEPTH)) u_queue (
    .clk, .rst_n, .clear(start), .push(instr_push), .wdata(instr_data),
    .pop(q_pop), .rdata(q_data), .empty(q_empty), .full(q_full), .level(q_level)
  );

  // control
  logic          ld_ready, ld_start, ld_old_valid, flip;
  coord_t        ld_nx, ld_ny, ld_ox, ld_oy;
  logic          ap_valid, ap_first, ap_last;
  logic [5:0]    ap_mask;
  logic [LN-1:0] ap_col, ap_phys_col, ap_yoff;

  controller u_ctrl (
    .clk, .rst_n, .start, .x0(cfg.x0), .y0(cfg.y0),
    .q_data, .q_empty, .q_pop,
    .ld_ready, .ld_start, .ld_nx, .ld_ny, .ld_ox, .ld_oy, .ld_old_valid,
    .flip,
    .ap_valid, .ap_mask, .ap_col, .ap_phys_col, .ap_yoff, .ap_first, .ap_last,
    .running, .halted, .stalls
  );

  // cache loading
  logic          c_we;
  logic [LN-1:0] c_row, c_col;

  addr_gen_in #(.IN_LAT(IN_LAT)) u_agin (
    .clk, .rst_n, .start(ld_start), .nx(ld_nx), .ny(ld_ny), .ox(ld_ox), .oy(ld_oy),
    .old_valid(ld_old_valid), .in_base(cfg.in_base), .in_pitch(cfg.in_pitch),
    .ready(ld_ready), .din_addr, .din_rd,
    .wr_en(c_we), .wr_row(c_row), .wr_col(c_col)
  );

  pix_t  pix  [KN];
  coef_t coef [KN];
  coef_t coef_sw [KN];

  image_cache u_cache (
    .clk, .rst_n, .wr_en(c_we), .wr_row(c_row), .wr_col(c_col), .wr_data(din_data),
    .flip, .rd_en(ap_valid), .rd_col(ap_phys_col), .rd_data(pix)
  );

  coef_store u_coef (
    .clk, .wr_en(coef_we), .wr_addr(coef_addr), .wr_data(coef_data),
    .rd_en(ap_valid), .rd_mask(ap_mask), .rd_col(ap_col), .rd_data(coef)
  );

  // controls aligned with the RAM outputs
  logic          v1, first1, last1;
  logic [LN-1:0] yoff1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      first1 <= 1'b0;
      last1  <= 1'b0;
      yoff1  <= '0;
    end else begin
      v1     <= ap_valid;
      first1 <= ap_first;
      last1  <= ap_last;
      yoff1  <= ap_yoff;
    end
  end

  switching_stage u_switch (.coef_in(coef), .shift(yoff1), .coef_out(coef_sw));

  mac_t bus_data;
  logic bus_valid, bus_first, bus_last;

  mac_array u_macs (
    .clk, .rst_n, .en(v1), .first(first1), .last(last1), .yoff(yoff1),
    .pix, .coef(coef_sw),
    .bus_data, .bus_valid, .bus_first, .bus_last
  );

  final_acc u_facc (
    .clk, .rst_n, .mode_2d(cfg.mode_2d),
    .in_data(bus_data), .in_valid(bus_valid), .in_first(bus_first), .in_last(bus_last),
    .out_data(dout_data), .out_valid(dout_we)
  );

  addr_gen_out u_agout (
    .clk, .rst_n, .start, .out_base(cfg.out_base), .out_width(cfg.out_width),
    .out_pitch(cfg.out_pitch), .adv(dout_we), .addr(dout_addr)
  );
endmodule
