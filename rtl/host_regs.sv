// host_regs: the static-RAM-like host interface.
//
// The host sees the chip as a small RAM: host_cs with host_we writes
// host_wdata at host_addr; host_cs without host_we reads, the data appearing
// on host_rdata in the next cycle. Addresses with bit 12 clear are the 4096
// coefficient bytes, {mask[5:0], row[2:0], col[2:0]}, written through
// coef_we/coef_addr/coef_data (write only). Addresses with bit 12 set are the
// registers of cc_pkg::reg_e: configuration (held in cfg), the control
// register (a write with bit 0 set pulses 'start'; bit 1 selects 2D mode), the
// instruction port (a write pulses instr_push with the word) and the
// read-only status and stall counters. Unused addresses read as zero.
//
// Appearing to the host as a static RAM follows the architecture; the
// register map, bus widths and read latency are choices of this design.
module host_regs
  import cc_pkg::*;
#(
  parameter int unsigned LVL_W = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_cs,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata,
  output logic               coef_we,
  output logic [11:0]        coef_addr,
  output logic [COEF_W-1:0]  coef_data,
  output cfg_t               cfg,
  output logic               start,
  output logic               instr_push,
  output logic [15:0]        instr_data,
  input  logic               running,
  input  logic               halted,
  input  logic               q_full,
  input  logic [LVL_W-1:0]   q_level,
  input  logic [15:0]        stalls
);
  logic wr, rd, is_reg;
  reg_e ra;
  assign wr     = host_cs && host_we;
  assign rd     = host_cs && !host_we;
  assign is_reg = host_addr[12];
  assign ra     = reg_e'(host_addr[3:0]);

  assign coef_we    = wr && !is_reg;
  assign coef_addr  = host_addr[11:0];
  assign coef_data  = host_wdata[COEF_W-1:0];
  assign instr_push = wr && is_reg && (ra == R_INSTR);
  assign instr_data = host_wdata;
  assign start      = wr && is_reg && (ra == R_CTRL) && host_wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (wr && is_reg) begin
      case (ra)
        R_CTRL:     cfg.mode_2d   <= host_wdata[1];
        R_INBASE_L: cfg.in_base[15:0]  <= host_wdata;
        R_INBASE_H: cfg.in_base[19:16] <= host_wdata[3:0];
        R_INPITCH:  cfg.in_pitch  <= host_wdata;
        R_OBASE_L:  cfg.out_base[15:0]  <= host_wdata;
        R_OBASE_H:  cfg.out_base[19:16] <= host_wdata[3:0];
        R_OWIDTH:   cfg.out_width <= host_wdata;
        R_OPITCH:   cfg.out_pitch <= host_wdata;
        R_X0:       cfg.x0        <= host_wdata;
        R_Y0:       cfg.y0        <= host_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rdata <= '0;
    end else if (rd) begin
      host_rdata <= '0;
      if (is_reg) begin
        case (ra)
          R_CTRL:     host_rdata <= {14'd0, cfg.mode_2d, 1'b0};
          R_INBASE_L: host_rdata <= cfg.in_base[15:0];
          R_INBASE_H: host_rdata <= {12'd0, cfg.in_base[19:16]};
          R_INPITCH:  host_rdata <= cfg.in_pitch;
          R_OBASE_L:  host_rdata <= cfg.out_base[15:0];
          R_OBASE_H:  host_rdata <= {12'd0, cfg.out_base[19:16]};
          R_OWIDTH:   host_rdata <= cfg.out_width;
          R_OPITCH:   host_rdata <= cfg.out_pitch;
          R_X0:       host_rdata <= cfg.x0;
          R_Y0:       host_rdata <= cfg.y0;
          R_STATUS:   host_rdata <= {8'(q_level), 5'd0, q_full, halted, running};
          R_STALLS:   host_rdata <= stalls;
          default:    host_rdata <= '0;
        endcase
      end
    end
  end
endmodule
