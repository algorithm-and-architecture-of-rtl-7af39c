// horizontal_aggregator -- horizontal pass of the two-pass cost aggregation.
//
// 31 vertical aggregated costs of consecutive columns, each shifted by the
// horizontal weight of its column centre (relative to the window centre), are
// summed into the final matching cost of one pixel at one disparity:
//   E_final = sum_col E_v,col * w_h,col .
// Combinational.
//
// The shift-and-add horizontal pass, one of three fed from a 33-cost window,
// follows the document; the 25-bit result width (no saturation) is this
// design's choice.
module horizontal_aggregator
  import mcadsw_pkg::*;
(
  input  logic [WIN-1:0][VC_W-1:0] vcost,
  input  wgt_col_t                 hw,
  output logic [FC_W-1:0]          fcost
);
  always_comb begin
    fcost = '0;
    for (int i = 0; i < WIN; i++) fcost += wshift_vcost(vcost[i], hw[i]);
  end
endmodule
