// wta_unit -- winner-takes-all for NSLOT (6) output pixels.
//
// Final costs arrive one per cycle, tagged with the output pixel (slot) and
// the disparity.  For d = 0 the slot is loaded; for d > 0 the cost replaces
// the stored minimum only when it is strictly smaller, so on a tie the
// smaller disparity wins (tie rule is this design's choice).  After the last
// disparity, best_d holds the disparity of minimal aggregated cost.
module wta_unit
  import mcadsw_pkg::*;
#(
  parameter int DMAX = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid,
  input  logic [2:0]             slot,
  input  logic [$clog2(DMAX)-1:0] d,
  input  logic [FC_W-1:0]        cost,
  output logic [NSLOT-1:0][$clog2(DMAX)-1:0] best_d
);
  logic [NSLOT-1:0][FC_W-1:0] best_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_c <= '0;
      best_d <= '0;
    end else if (valid && (d == '0 || cost < best_c[slot])) begin
      best_c[slot] <= cost;
      best_d[slot] <= d;
    end
  end
endmodule
