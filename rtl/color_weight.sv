// color_weight -- Manhattan colour distance and weight table.
//
// cdist = |dY| + |dU| + |dV| between a pixel and the centre pixel, then the
// scaled-and-truncated weight of the algorithm (64*exp(-cdist/gamma) with only
// its leading one kept), coded as a 3-bit shift: 0 = weight 0, k = 2^(k-1).
// The step positions (every 5 distance units, zero from 30 on) follow the
// weight curve of the algorithm; the code format is this design's choice.
// Combinational.
module color_weight
  import mcadsw_pkg::*;
(
  input  yuv_t            a,
  input  yuv_t            c,
  output logic [WC_W-1:0] w
);
  logic [9:0] cdist;
  function automatic logic [7:0] absdiff(logic [7:0] x, logic [7:0] y);
    return (x > y) ? x - y : y - x;
  endfunction
  always_comb begin
    cdist = 10'(absdiff(a.y, c.y)) + 10'(absdiff(a.u, c.u)) + 10'(absdiff(a.v, c.v));
    w    = weight_code(cdist);
  end
endmodule
