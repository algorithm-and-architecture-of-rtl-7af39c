// cost_aggregator_wta -- census cost, two-pass weighted aggregation and
// winner-takes-all for one 18x18 block.
//
// Rows of the block are processed one at a time, disparities in order 0..DMAX-1
// within a row.  For each (row y, disparity d) the six column groups of 8 region
// columns are issued on consecutive cycles (t = 6d + g):
//   t     read address (y, g, d) to the census and vertical-weight buffers
//   t+1   8 vertical_aggregator lanes: Hamming cost, weight shift, adder tree
//         -> written into the ping-pong buffer bank d mod 2
//   6d+7+k (k = 0..5, once all 48 vertical costs of d are in)
//         33 costs of columns 3k..3k+32 -> 3 horizontal_aggregators
//         -> wta_unit j updates output pixel x = 3k+j
// so one row takes 7 + 6*DMAX cycles (391 for DMAX = 64) and a block
// 18 * 391 = 7038 cycles, as the document's schedule gives.  The WTA results
// of a row are copied into an 18-entry output latch in the first cycle of the
// next row and leave one per cycle through out_valid/out_ready (with image
// coordinates).  If the latch still holds the previous row when a row ends,
// the aggregator waits (stall) until it has drained.  The latch and the
// stall rule are this design's.
module cost_aggregator_wta
  import mcadsw_pkg::*;
#(
  parameter int DMAX = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  crd_t              bx0,
  input  crd_t              by0,
  output logic              busy,
  output logic              done,
  output logic              stall,
  // buffer read ports
  output logic [4:0]        rd_y,
  output logic [2:0]        rd_grp,
  output logic [$clog2(DMAX)-1:0] rd_d,
  output logic [4:0]        hrd_y,
  output logic [2:0]        hrd_k,
  input  cen_col_t [LANES-1:0] mcl_i,
  input  cen_col_t [LANES-1:0] mcr_i,
  input  wgt_col_t [LANES-1:0] vw_i,
  input  wgt_col_t [NWTA-1:0]  hw_i,
  // disparity output
  output logic              out_valid,
  input  logic              out_ready,
  output crd_t              out_x,
  output crd_t              out_y,
  output logic [$clog2(DMAX)-1:0] out_d
);
  localparam int DW    = $clog2(DMAX);
  localparam int ROW_T = 7 + NGRP * DMAX;   // cycles per output row

  typedef enum logic [1:0] {S_IDLE, S_ROW, S_WAIT} state_t;
  state_t state;

  int unsigned t, y;
  crd_t        bx_q, by_q;

  // stage 0: issue
  logic          v0;
  logic [DW-1:0] d0;
  logic [2:0]    g0;
  assign v0 = (state == S_ROW) && (t < NGRP * DMAX);
  assign d0 = DW'(t / NGRP);
  assign g0 = 3'(t % NGRP);
  assign rd_y   = 5'(y);
  assign rd_grp = g0;
  assign rd_d   = d0;

  // stage 1: vertical aggregation into the ping-pong buffer
  logic          v1;
  logic [DW-1:0] d1;
  logic [2:0]    g1;
  logic [LANES-1:0][VC_W-1:0] vcost;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    vertical_aggregator u_va (.mcl(mcl_i[l]), .mcr(mcr_i[l]), .vw(vw_i[l]), .vcost(vcost[l]));
  end

  // stage 2: horizontal aggregation and WTA
  logic          hv;
  logic [DW-1:0] hd;
  logic [2:0]    hk;
  logic [NOUT-1:0][VC_W-1:0] hcost;
  logic [NWTA-1:0][FC_W-1:0] fcost;
  logic          h_load;

  assign h_load = v1 && (g1 == 3'(NGRP - 1));
  assign hrd_y  = 5'(y);
  assign hrd_k  = (!h_load && hv && hk != 3'(NSLOT - 1)) ? hk + 3'd1 : 3'd0;

  pingpong_buffer u_pp (
    .clk, .rst_n, .we(v1), .wbank(d1[0]), .wgrp(g1), .wdata(vcost),
    .rbank(hd[0]), .rpos(hk), .rdata(hcost));

  logic [NWTA-1:0][NSLOT-1:0][DW-1:0] best;
  for (genvar j = 0; j < NWTA; j++) begin : g_h
    horizontal_aggregator u_ha (.vcost(hcost[j +: WIN]), .hw(hw_i[j]), .fcost(fcost[j]));
    wta_unit #(.DMAX(DMAX)) u_wta (
      .clk, .rst_n, .valid(hv), .slot(hk), .d(hd), .cost(fcost[j]), .best_d(best[j]));
  end

  // output latch
  logic [BLK-1:0][DW-1:0] lat_d;
  logic [4:0]  lat_cnt;
  crd_t        lat_x0, lat_y;
  logic        cap_now;
  crd_t        cap_y;
  logic        last_row;

  assign out_valid = (lat_cnt != '0);
  assign out_x     = lat_x0 + crd_t'(BLK - int'(lat_cnt));
  assign out_y     = lat_y;
  assign out_d     = lat_d[BLK - int'(lat_cnt)];
  assign busy      = (state != S_IDLE) || cap_now;
  assign stall     = (state == S_WAIT) && out_valid;
  assign last_row  = (y == BLK - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; t <= 0; y <= 0; bx_q <= '0; by_q <= '0;
      v1 <= 1'b0; d1 <= '0; g1 <= '0; hv <= 1'b0; hd <= '0; hk <= '0;
      lat_cnt <= '0; lat_d <= '0; lat_x0 <= '0; lat_y <= '0;
      cap_now <= 1'b0; cap_y <= '0; done <= 1'b0;
    end else begin
      done    <= 1'b0;
      cap_now <= 1'b0;
      // pipeline registers
      v1 <= v0; d1 <= d0; g1 <= g0;
      if (h_load) begin hv <= 1'b1; hd <= d1; hk <= '0; end
      else if (hv) begin
        if (hk == 3'(NSLOT - 1)) hv <= 1'b0;
        else hk <= hk + 3'd1;
      end
      // row sequencing
      case (state)
        S_IDLE: if (start) begin
          bx_q <= bx0; by_q <= by0; y <= 0; t <= 0; state <= S_ROW;
        end
        S_ROW: begin
          if (t == ROW_T - 1) begin
            if (!out_valid) begin
              cap_now <= 1'b1; cap_y <= by_q + crd_t'(y);
              if (last_row) begin state <= S_IDLE; done <= 1'b1; end
              else begin y <= y + 1; t <= 0; end
            end else state <= S_WAIT;
          end else t <= t + 1;
        end
        S_WAIT: if (!out_valid) begin
          cap_now <= 1'b1; cap_y <= by_q + crd_t'(y);
          if (last_row) begin state <= S_IDLE; done <= 1'b1; end
          else begin y <= y + 1; t <= 0; state <= S_ROW; end
        end
        default: state <= S_IDLE;
      endcase
      // latch: capture WTA results or drain one entry
      if (cap_now) begin
        for (int k = 0; k < NSLOT; k++)
          for (int j = 0; j < NWTA; j++) lat_d[k * NWTA + j] <= best[j][k];
        lat_cnt <= 5'(BLK);
        lat_x0  <= bx_q;
        lat_y   <= cap_y;
      end else if (out_valid && out_ready) lat_cnt <= lat_cnt - 5'd1;
    end
  end

  // The latch is only refilled once it is empty.
  a_cap_empty: assert property (@(posedge clk) disable iff (!rst_n) cap_now |-> !out_valid);
endmodule
