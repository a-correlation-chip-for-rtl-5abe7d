// mac_array: the KN multiply-accumulators and the shared result bus.
//
// Every enabled cycle one cache column (KN pixels, one per physical cache
// row) and KN already rotated coefficients arrive; multiplier k works on
// physical row k. Over KN cycles each MAC forms the 1D dot product of one
// window row with one mask row. When they finish, the KN results are put on
// the single MAC_W-bit result bus one per cycle, starting in the cycle they
// appear and lasting KN cycles,
// in window row order (window row j sits in physical row (j + yoff) mod KN,
// yoff being the window's y-offset captured with 'last'). bus_first and
// bus_last mark the first and last value of a group. A new group may finish
// every KN cycles without overwriting results still waiting for the bus.
//
// Eight MACs sharing one 27-bit output follow the architecture; the bus
// schedule and the row order are choices of this design.
module mac_array
  import cc_pkg::*;
#(
  parameter int unsigned N = KN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic                 last,
  input  logic [$clog2(N)-1:0] yoff,
  input  pix_t                 pix  [N],
  input  coef_t                coef [N],
  output mac_t                 bus_data,
  output logic                 bus_valid,
  output logic                 bus_first,
  output logic                 bus_last
);
  localparam int unsigned LN = $clog2(N);

  mac_t        res [N];
  logic [N-1:0] rv;
  logic        done;     // all MACs finish together

  for (genvar k = 0; k < int'(N); k++) begin : g_mac
    mac u_mac (
      .clk, .rst_n, .en, .first, .last,
      .pix(pix[k]), .coef(coef[k]),
      .res(res[k]), .res_valid(rv[k])
    );
  end

  assign done = &rv;

  // yoff of the group that is finishing, and of the group on the bus. The
  // first value goes on the bus in the cycle the results appear, so a group
  // that finishes KN cycles later finds the bus free.
  logic [LN-1:0] yoff_q, yoff_res;
  logic [LN-1:0] cnt, sel;
  logic          busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yoff_q   <= '0;
      yoff_res <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
    end else begin
      if (en && last) yoff_q <= yoff;
      if (done) begin
        busy     <= 1'b1;
        cnt      <= LN'(1);
        yoff_res <= yoff_q;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == LN'(N-1)) busy <= 1'b0;
      end
    end
  end

  always_comb begin
    bus_valid = done || busy;
    bus_first = done;
    bus_last  = busy && !done && (cnt == LN'(N-1));
    sel       = done ? (yoff_q) : LN'(cnt + yoff_res);
    bus_data  = res[sel];
  end
endmodule
