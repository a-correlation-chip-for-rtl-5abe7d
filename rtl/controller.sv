// controller: runs the program of step/mask instructions.
//
// Two stages work in parallel. The load stage takes the next instruction
// from the queue, moves the window origin by the instruction's step and has
// addr_gen_in fetch the pixels the new window lacks into the writable cache
// banks. The apply stage drives one application of a mask: for KN cycles it
// reads window column c (physical cache column (origin_x + c) mod KN) and
// mask column c, marking c = 0 'first' and c = KN-1 'last' and passing the
// window's y-offset for the switching stage. When the apply stage is on its
// last column (or idle) and the load is complete, the window is handed over:
// the cache banks flip, the apply stage starts on it in the next cycle, and
// in the same cycle the load stage starts on the following instruction. So
// with steps of at most one pixel in x or y and a single-cycle external
// memory, a mask is applied every KN cycles without stalls; larger steps make
// the apply stage wait until the cache is loaded. 'stalls' counts the cycles
// in which the apply stage is idle while a window is being loaded, so a
// window that needs F pixels costs max(0, F - KN) stall cycles (the first
// window of a program F).
//
// 'start' (from the host) begins a program at origin (x0, y0) with an empty
// cache; the first instruction's step is applied to that origin. A HALT
// instruction ends the program: once the last application has left the
// datapath (DRAIN cycles) 'running' drops and 'halted' is set. An empty queue
// simply makes the chip wait for the host.
//
// The instruction fields and the overlap of loading with applying follow
// the architecture; the direction bits, the HALT encoding, the start origin,
// the stall counter and the drain delay are choices of this design.
module controller
  import cc_pkg::*;
#(
  parameter int unsigned N     = KN,
  parameter int unsigned DRAIN = KN + 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  coord_t                x0,
  input  coord_t                y0,
  // instruction queue
  input  logic [15:0]           q_data,
  input  logic                  q_empty,
  output logic                  q_pop,
  // cache loader
  input  logic                  ld_ready,
  output logic                  ld_start,
  output coord_t                ld_nx,
  output coord_t                ld_ny,
  output coord_t                ld_ox,
  output coord_t                ld_oy,
  output logic                  ld_old_valid,
  // cache bank hand-over
  output logic                  flip,
  // apply stage: read addresses and control of one column
  output logic                  ap_valid,
  output logic [5:0]            ap_mask,
  output logic [$clog2(N)-1:0]  ap_col,      // mask / window column
  output logic [$clog2(N)-1:0]  ap_phys_col, // cache column
  output logic [$clog2(N)-1:0]  ap_yoff,
  output logic                  ap_first,
  output logic                  ap_last,
  // status
  output logic                  running,
  output logic                  halted,
  output logic [15:0]           stalls
);
  localparam int unsigned LN = $clog2(N);

  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_HALT} lstate_e;
  lstate_e lst;

  instr_t  head;
  coord_t  l_x, l_y;       // origin of the newest window given to the loader
  logic    l_valid;        // the cache holds (or is getting) that window
  logic [5:0] l_mask;

  logic          a_busy;
  logic [LN-1:0] a_col, a_ox, a_oy;
  logic [5:0]    a_mask;
  logic [$clog2(DRAIN+1)-1:0] drain;

  logic can_accept, handoff, take;

  assign head       = instr_t'(q_data);
  assign can_accept = !a_busy || (a_col == LN'(N-1));
  assign handoff    = running && (lst == L_LOAD) && ld_ready && can_accept;
  // the load stage takes an instruction when it is free or handing over
  assign take       = running && !q_empty && ((lst == L_IDLE) || handoff);

  assign q_pop        = take;
  assign ld_start     = take && !is_halt(head);
  assign ld_nx        = l_x + step(head.xneg, head.xvec);
  assign ld_ny        = l_y + step(head.yneg, head.yvec);
  assign ld_ox        = l_x;
  assign ld_oy        = l_y;
  assign ld_old_valid = l_valid;
  assign flip         = handoff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lst     <= L_IDLE;
      l_x     <= '0;
      l_y     <= '0;
      l_valid <= 1'b0;
      l_mask  <= '0;
      a_busy  <= 1'b0;
      a_col   <= '0;
      a_ox    <= '0;
      a_oy    <= '0;
      a_mask  <= '0;
      running <= 1'b0;
      halted  <= 1'b0;
      stalls  <= '0;
      drain   <= '0;
    end else if (start) begin
      lst     <= L_IDLE;
      l_x     <= x0;
      l_y     <= y0;
      l_valid <= 1'b0;
      a_busy  <= 1'b0;
      running <= 1'b1;
      halted  <= 1'b0;
      stalls  <= '0;
      drain   <= '0;
    end else begin
      // apply stage
      if (handoff) begin
        a_busy <= 1'b1;
        a_col  <= '0;
        a_mask <= l_mask;
        a_ox   <= l_x[LN-1:0];
        a_oy   <= l_y[LN-1:0];
      end else if (a_busy) begin
        a_col <= a_col + 1'b1;
        if (a_col == LN'(N-1)) a_busy <= 1'b0;
      end

      // load stage
      if (take) begin
        if (is_halt(head)) begin
          lst <= L_HALT;
        end else begin
          lst     <= L_LOAD;
          l_x     <= ld_nx;
          l_y     <= ld_ny;
          l_valid <= 1'b1;
          l_mask  <= head.mask;
        end
      end else if (handoff) begin
        lst <= L_IDLE;
      end

      // a cycle in which no column is applied because the next window is
      // still being loaded (or is handed over only in this cycle)
      if (running && (lst == L_LOAD) && !a_busy && (stalls != 16'hFFFF))
        stalls <= stalls + 1'b1;

      // halt once the datapath has drained
      if (lst == L_HALT && !a_busy) begin
        if (drain == ($clog2(DRAIN+1))'(DRAIN)) begin
          running <= 1'b0;
          halted  <= 1'b1;
          lst     <= L_IDLE;
          drain   <= '0;
        end else begin
          drain <= drain + 1'b1;
        end
      end
    end
  end

  assign ap_valid    = a_busy;
  assign ap_mask     = a_mask;
  assign ap_col      = a_col;
  assign ap_phys_col = a_col + a_ox;
  assign ap_yoff     = a_oy;
  assign ap_first    = a_busy && (a_col == '0);
  assign ap_last     = a_busy && (a_col == LN'(N-1));
endmodule
