// mac: one multiply-accumulator of the datapath.
//
// Each enabled cycle it multiplies a 16-bit signed pixel by an 8-bit signed
// coefficient and adds the product to its accumulator; 'first' restarts the
// sum. After KN cycles ('last') the full-precision 27-bit dot product is
// copied to a result register, which holds it while the accumulator starts the
// next dot product, and res_valid pulses for one cycle. No intermediate result
// is truncated: 24-bit products summed 8 times fit 27 bits.
//
// The 16 x 8 multiply and 27-bit width follow the architecture; treating
// pixels as signed and the held result register are choices of this design.
module mac
  import cc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  first,
  input  logic  last,
  input  pix_t  pix,
  input  coef_t coef,
  output mac_t  res,
  output logic  res_valid
);
  mac_t acc, sum;

  always_comb sum = (first ? mac_t'(0) : acc) + mac_t'(pix) * mac_t'(coef);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= en && last;
      if (en) begin
        acc <= sum;
        if (last) res <= sum;
      end
    end
  end
endmodule
