// mcadsw_top -- MCADSW stereo disparity engine.
//
// Computes a dense disparity map (left image as reference, right image
// searched at x-d, d = 0..DMAX-1) with the mini-census adaptive support
// weight algorithm: 6-bit mini-census matching cost, YUV Manhattan-distance
// colour weights approximated by one power of two, two-pass (vertical then
// horizontal) weighted aggregation over a 31x31 window, winner-takes-all.
//
// The frame is processed in 18x18 output blocks in raster order
// (ceil(IMG_W/18) x ceil(IMG_H/18) blocks; outputs that fall outside the image
// are dropped).  Block s is prepared (mini-census transformer, weight
// generator, writing census/weight bank s mod 2) while block s-1 is aggregated
// from the other bank by the cost aggregator and WTA, so preparation hides
// behind the 7038-cycle aggregation of a block.  Disparities go through the
// disparity FIFO to memory; the memory controller serves the FIFO first and
// the two preparation units round robin.
//
// Memory (32-bit words, see mcadsw_pkg): Y left, Y right, U left, V left
// planes of IMG_W*IMG_H/4 words each (pixel x = 4w+i in byte i), then the
// disparity map, one disparity per word in bits [5:0] at base_disp + y*IMG_W + x.
// mem_req/mem_we/mem_addr/mem_wdata are valid together; a request is taken
// in a cycle with mem_ready high; read data are expected on mem_rdata in the
// following cycle.  start begins a frame; done pulses when the last disparity
// has been written.  IMG_W must be a multiple of 4.
//
// Follows the document: the four units and their connections, the 18x18
// block, preparation overlapped with aggregation, the 32-bit memory port and
// FIFO-first arbitration.  This design's own choices: the memory map and
// handshake, one disparity per word, clamping at the image border, the left
// image as reference, and the start/busy/done control.
module mcadsw_top
  import mcadsw_pkg::*;
#(
  parameter int IMG_W = 352,
  parameter int IMG_H = 288,
  parameter int DMAX  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_ready,
  input  logic [31:0]       mem_rdata
);
  localparam int DW  = $clog2(DMAX);
  localparam int NBX = (IMG_W + BLK - 1) / BLK;
  localparam int NBY = (IMG_H + BLK - 1) / BLK;
  localparam int NB  = NBX * NBY;
  localparam int FW  = ADDR_W + DW;

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_FLUSH} state_t;
  state_t state;

  mem_req_t [2:0] mreq;
  logic [2:0]     gnt, rvalid;
  logic [31:0]    rdata;

  memory_controller u_mc (
    .clk, .rst_n, .req_i(mreq), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rdata);

  // block scheduler
  int unsigned s;                    // step: prepare block s, aggregate s-1
  logic        prep_start, agg_start, prep_bank;
  logic        mct_pend, wg_pend, agg_pend;
  crd_t        pbx, pby, abx, aby;
  logic        mct_busy, mct_done, wg_busy, wg_done, agg_busy, agg_done, agg_stall;

  assign pbx = crd_t'((s % NBX) * BLK);
  assign pby = crd_t'((s / NBX) * BLK);
  assign abx = crd_t'(((s - 1) % NBX) * BLK);
  assign aby = crd_t'(((s - 1) / NBX) * BLK);
  assign prep_bank = s[0];

  // read-port wiring between the aggregator and the buffers
  logic [4:0] rd_y, hrd_y;
  logic [2:0] rd_grp, hrd_k;
  logic [DW-1:0] rd_d;
  cen_col_t [LANES-1:0] mcl, mcr;
  wgt_col_t [LANES-1:0] vw;
  wgt_col_t [NWTA-1:0]  hw;
  logic agg_bank;

  mini_census_transformer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DMAX(DMAX)) u_mct (
    .clk, .rst_n, .start(prep_start), .bx0(pbx), .by0(pby), .wr_bank(prep_bank),
    .busy(mct_busy), .done(mct_done), .mreq(mreq[1]), .gnt(gnt[1]), .rvalid(rvalid[1]), .rdata,
    .rd_bank(agg_bank), .rd_y, .rd_grp, .rd_d, .mcl_o(mcl), .mcr_o(mcr));

  weight_generator #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_wg (
    .clk, .rst_n, .start(prep_start), .bx0(pbx), .by0(pby), .wr_bank(prep_bank),
    .busy(wg_busy), .done(wg_done), .mreq(mreq[2]), .gnt(gnt[2]), .rvalid(rvalid[2]), .rdata,
    .rd_bank(agg_bank), .rd_y, .rd_grp, .vw_o(vw), .hrd_y, .hrd_k, .hw_o(hw));

  logic out_valid, out_ready;
  crd_t out_x, out_y;
  logic [DW-1:0] out_d;

  cost_aggregator_wta #(.DMAX(DMAX)) u_agg (
    .clk, .rst_n, .start(agg_start), .bx0(abx), .by0(aby), .busy(agg_busy), .done(agg_done),
    .stall(agg_stall), .rd_y, .rd_grp, .rd_d, .hrd_y, .hrd_k, .mcl_i(mcl), .mcr_i(mcr),
    .vw_i(vw), .hw_i(hw), .out_valid, .out_ready, .out_x, .out_y, .out_d);

  // disparity FIFO
  logic          f_full, f_empty, f_push, in_img;
  logic [FW-1:0] f_din, f_dout;
  logic [$clog2(32):0] f_count;

  assign in_img    = (out_x < crd_t'(IMG_W)) && (out_y < crd_t'(IMG_H));
  assign f_push    = out_valid && in_img;
  assign out_ready = !in_img || !f_full;
  assign f_din     = {base_disp(IMG_W, IMG_H) + ADDR_W'(int'(out_y) * IMG_W + int'(out_x)), out_d};

  disparity_fifo #(.DEPTH(32), .W(FW)) u_fifo (
    .clk, .rst_n, .push(f_push), .din(f_din), .full(f_full),
    .pop(gnt[0]), .dout(f_dout), .empty(f_empty), .count(f_count));

  always_comb begin
    mreq[0]       = '0;
    mreq[0].req   = !f_empty;
    mreq[0].we    = 1'b1;
    mreq[0].addr  = f_dout[FW-1:DW];
    mreq[0].wdata = 32'(f_dout[DW-1:0]);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; s <= 0; prep_start <= 1'b0; agg_start <= 1'b0; agg_bank <= 1'b0;
      mct_pend <= 1'b0; wg_pend <= 1'b0; agg_pend <= 1'b0; done <= 1'b0;
    end else begin
      prep_start <= 1'b0; agg_start <= 1'b0; done <= 1'b0;
      if (mct_done) mct_pend <= 1'b0;
      if (wg_done)  wg_pend  <= 1'b0;
      if (agg_done) agg_pend <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          s <= 0; prep_start <= 1'b1; mct_pend <= 1'b1; wg_pend <= 1'b1;
          state <= S_STEP;
        end
        S_STEP: if (!prep_start && !agg_start && !mct_pend && !wg_pend && !agg_pend) begin
          // step s finished: block s is prepared, block s-1 aggregated
          if (s == NB) state <= S_FLUSH;
          else begin
            s <= s + 1;
            agg_start <= 1'b1; agg_pend <= 1'b1; agg_bank <= s[0];
            if (s + 1 < NB) begin
              prep_start <= 1'b1; mct_pend <= 1'b1; wg_pend <= 1'b1;
            end
          end
        end
        S_FLUSH: if (!agg_busy && !out_valid && f_empty) begin
          state <= S_IDLE; done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // scheduler rules: a preparation only starts on idle units (so a census or
  // weight bank is never refilled mid-job), and the aggregator only stalls
  // inside a block
  a_prep_idle: assert property (@(posedge clk) disable iff (!rst_n)
    prep_start |-> !mct_busy && !wg_busy);
  a_stall_busy: assert property (@(posedge clk) disable iff (!rst_n)
    agg_stall |-> agg_busy);
endmodule
