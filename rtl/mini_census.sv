// mini_census -- mini-census transform of one pixel.
//
// The six template pixels (two above, two below, and the pixels two columns to
// the left and right of the centre, as in the algorithm's 6-pixel template)
// are compared with the centre luminance.  A neighbour that is larger than the
// centre gives 0, otherwise 1.  Bit order (MSB first): (0,-2), (0,-1), (-2,0),
// (+2,0), (0,+1), (0,+2) as (dx,dy); with this order the two worked example
// pixels of the algorithm give 111000 and 111011.  Purely combinational.
//
// The template, its six positions and the compare-with-centre rule follow the
// document; the bit order and the 'not larger gives 1' convention are read
// from its worked examples.
module mini_census
  import mcadsw_pkg::*;
(
  input  logic [7:0]       center,
  input  logic [5:0][7:0]  nb,     // nb[5] = (0,-2) ... nb[0] = (0,+2)
  output logic [CEN_W-1:0] code
);
  always_comb begin
    for (int i = 0; i < 6; i++) code[i] = (nb[i] <= center);
  end
endmodule
