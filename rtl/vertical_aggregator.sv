// vertical_aggregator -- one column lane of the vertical cost aggregation.
//
// For the 31 pixels of one window column: census cost = Hamming distance of
// the left and right mini-census strings (one hamming_cost per pixel, all in
// parallel), each cost multiplied by its vertical weight with a single shift,
// then summed by an adder tree into the vertical aggregated cost
//   E_v = sum_i H(bL_i, bR_i,d) * w_v,i .
// Combinational; the surrounding aggregator registers its inputs and output.
//
// The column-parallel cost computation, the multiply-by-shift and the sum
// follow the document; the adder-tree shape and the 14-bit result (wide
// enough for 31 * 6 * 64, so nothing saturates) are this design's choices.
module vertical_aggregator
  import mcadsw_pkg::*;
(
  input  cen_col_t         mcl,    // left censuses of the column
  input  cen_col_t         mcr,    // right censuses at disparity d
  input  wgt_col_t         vw,     // vertical weight codes
  output logic [VC_W-1:0]  vcost
);
  logic [WIN-1:0][2:0]      cost;
  logic [WIN-1:0][VC_W-1:0] wcost;

  for (genvar i = 0; i < WIN; i++) begin : g_pix
    hamming_cost u_ham (.a(mcl[i]), .b(mcr[i]), .cost(cost[i]));
    assign wcost[i] = wshift_cost(cost[i], vw[i]);
  end

  always_comb begin
    vcost = '0;
    for (int i = 0; i < WIN; i++) vcost += wcost[i];
  end
endmodule
