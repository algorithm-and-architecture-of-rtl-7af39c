// mini_census_transformer -- left and right mini-census units with their
// input buffers (YL, YR) and double-banked mini-census buffers (MCL, MCR).
//
// For an 18x18 output block with top-left image pixel (bx0, by0) the cost
// aggregator needs censuses of a 48x48 region starting at (bx0-15, by0-15) in
// the left image, and, because the right image is searched at x-d for
// d = 0..DMAX-1, a 48 x (48+DMAX-1) region starting at (bx0-15-(DMAX-1),
// by0-15) in the right image.  On start the unit fetches the two luminance
// windows (2 extra pixels around each region for the template) through one
// memory port, left first, then computes one whole region column of censuses
// per cycle (48 kernels per side, both sides together) and writes them into
// bank wr_bank.  done pulses when the bank is complete.
//
// Read side (cost aggregator): for output row rd_y, column group rd_grp and
// disparity rd_d it returns, one cycle later, LANES columns of 31 censuses:
// left columns 8*grp+l and the matching right columns 8*grp+l+DMAX-1-d, rows
// rd_y .. rd_y+30, from bank rd_bank.  Columns are computed one per cycle
// (this design's choice); the document gives the unit's parts, not its rate.
module mini_census_transformer
  import mcadsw_pkg::*;
#(
  parameter int IMG_W = 352,
  parameter int IMG_H = 288,
  parameter int DMAX  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  crd_t              bx0,
  input  crd_t              by0,
  input  logic              wr_bank,
  output logic              busy,
  output logic              done,
  // memory port
  output mem_req_t          mreq,
  input  logic              gnt,
  input  logic              rvalid,
  input  logic [31:0]       rdata,
  // read port
  input  logic              rd_bank,
  input  logic [4:0]        rd_y,
  input  logic [2:0]        rd_grp,
  input  logic [$clog2(DMAX)-1:0] rd_d,
  output cen_col_t [LANES-1:0] mcl_o,
  output cen_col_t [LANES-1:0] mcr_o
);
  localparam int RC  = REG + DMAX - 1;   // right census region width
  localparam int IWL = REG + 2 * CM;     // left input window width
  localparam int IWR = RC + 2 * CM;      // right input window width
  localparam int IH  = REG + 2 * CM;

  typedef enum logic [1:0] {S_IDLE, S_FETCH_L, S_FETCH_R, S_CENSUS} state_t;
  state_t state;

  logic [7:0] yl [IH][IWL];
  logic [7:0] yr [IH][IWR];
  logic [CEN_W-1:0] mcl [2][REG][REG];
  logic [CEN_W-1:0] mcr [2][REG][RC];

  logic     l_start, r_start, l_done, r_done, l_busy, r_busy;
  mem_req_t l_req, r_req;
  crd_t     bx_q, by_q;
  logic     bank_q;
  int unsigned col;

  input_buffer #(.RW(IWL), .RH(IH), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_yl_buf (
    .clk, .rst_n, .start(l_start), .ox(bx_q - crd_t'(HALF + CM)), .oy(by_q - crd_t'(HALF + CM)),
    .plane_base(base_yl(IMG_W, IMG_H)), .busy(l_busy), .done(l_done), .mreq(l_req),
    .gnt(gnt && l_req.req), .rvalid(rvalid && state == S_FETCH_L), .rdata, .pix(yl));

  input_buffer #(.RW(IWR), .RH(IH), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_yr_buf (
    .clk, .rst_n, .start(r_start), .ox(bx_q - crd_t'(HALF + DMAX - 1 + CM)), .oy(by_q - crd_t'(HALF + CM)),
    .plane_base(base_yr(IMG_W, IMG_H)), .busy(r_busy), .done(r_done), .mreq(r_req),
    .gnt(gnt && r_req.req), .rvalid(rvalid && state == S_FETCH_R), .rdata, .pix(yr));

  assign mreq = l_req.req ? l_req : r_req;

  // census kernels: one region column per cycle for each side
  logic [REG-1:0][CEN_W-1:0] lcol, rcol;
  for (genvar r = 0; r < REG; r++) begin : g_k
    int unsigned cl, cr;
    assign cl = (col < REG) ? col : 0;
    assign cr = (col < RC) ? col : 0;
    mini_census u_l (.center(yl[r+CM][cl+CM]),
      .nb({yl[r][cl+CM], yl[r+1][cl+CM], yl[r+CM][cl], yl[r+CM][cl+2*CM], yl[r+3][cl+CM], yl[r+4][cl+CM]}),
      .code(lcol[r]));
    mini_census u_r (.center(yr[r+CM][cr+CM]),
      .nb({yr[r][cr+CM], yr[r+1][cr+CM], yr[r+CM][cr], yr[r+CM][cr+2*CM], yr[r+3][cr+CM], yr[r+4][cr+CM]}),
      .code(rcol[r]));
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; bx_q <= '0; by_q <= '0; bank_q <= 1'b0; col <= 0;
      l_start <= 1'b0; r_start <= 1'b0; done <= 1'b0;
    end else begin
      l_start <= 1'b0; r_start <= 1'b0; done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          bx_q <= bx0; by_q <= by0; bank_q <= wr_bank;
          l_start <= 1'b1;
          state <= S_FETCH_L;
        end
        S_FETCH_L: if (l_done) begin r_start <= 1'b1; state <= S_FETCH_R; end
        S_FETCH_R: if (r_done) begin col <= 0; state <= S_CENSUS; end
        S_CENSUS: begin
          if (col == RC - 1) begin state <= S_IDLE; done <= 1'b1; end
          col <= col + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_CENSUS) begin
      for (int r = 0; r < REG; r++) begin
        if (col < REG) mcl[bank_q][r][col] <= lcol[r];
        mcr[bank_q][r][col] <= rcol[r];
      end
    end
  end

  // registered read port
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      for (int i = 0; i < WIN; i++) begin
        mcl_o[l][i] <= mcl[rd_bank][int'(rd_y) + i][int'(rd_grp) * LANES + l];
        mcr_o[l][i] <= mcr[rd_bank][int'(rd_y) + i][int'(rd_grp) * LANES + l + DMAX - 1 - int'(rd_d)];
      end
    end
  end
endmodule
