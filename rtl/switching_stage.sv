// switching_stage: rotates the KN coefficients of a mask column so that they
// line up with the pixels of the cache column.
//
// The image cache stores window row j in physical row (origin_y + j) mod KN,
// so the window's y-offset is not removed by addressing. Instead the
// coefficient of mask row r is sent to multiplier (r + shift) mod KN, a barrel
// rotation done in parallel on all coefficients. Purely combinational.
//
// Removing the y-offset by rotating the coefficients follows the
// architecture; the rotation direction follows from the cache layout chosen in
// this design.
module switching_stage
  import cc_pkg::*;
#(
  parameter int unsigned N = KN
) (
  input  coef_t                 coef_in  [N],
  input  logic [$clog2(N)-1:0]  shift,
  output coef_t                 coef_out [N]
);
  always_comb begin
    for (int k = 0; k < int'(N); k++)
      coef_out[k] = coef_in[($clog2(N))'(k - int'(shift))];
  end
endmodule
