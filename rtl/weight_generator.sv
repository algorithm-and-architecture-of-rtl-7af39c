// weight_generator -- adaptive support weights for one 18x18 block.
//
// Three input buffers (Y, U, V of the left image) fetch the 48x48 region at
// (bx0-15, by0-15) through one memory port (Y, then U, then V).  The weight
// generation kernel then works row by row of the block: for output row y it
// walks the 48 region columns (one per cycle) and computes the 31 vertical
// weights of column c, i.e. the weight of pixel (c, y+i) relative to the
// column centre (c, y+15), i = 0..30; meanwhile it copies each column centre
// into the horizontal row buffer.  It then produces, one output pixel per
// cycle, the 31 horizontal weights of pixel x (weights of the row-buffer
// pixels x .. x+30 relative to pixel x+15) without going back to the input
// buffers.  Both passes share one set of 31 Manhattan-distance / weight-table
// units (color_weight).  Results go to the vertical (VW) and horizontal (HW)
// weight buffers, bank wr_bank; done pulses when the bank is complete.
// Rate (48+18 cycles per output row) is this design's choice.
//
// Read side (cost aggregator), both registered (one cycle):
//   vw_o[l] = 31 vertical weights of region column 8*rd_grp+l for row rd_y
//   hw_o[j] = 31 horizontal weights of output pixel 3*hrd_k+j of row hrd_y
module weight_generator
  import mcadsw_pkg::*;
#(
  parameter int IMG_W = 352,
  parameter int IMG_H = 288
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
  // read ports
  input  logic              rd_bank,
  input  logic [4:0]        rd_y,
  input  logic [2:0]        rd_grp,
  output wgt_col_t [LANES-1:0] vw_o,
  input  logic [4:0]        hrd_y,
  input  logic [2:0]        hrd_k,
  output wgt_col_t [NWTA-1:0]  hw_o
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH_Y, S_FETCH_U, S_FETCH_V, S_VERT, S_HORZ} state_t;
  state_t state;

  logic [7:0] py [REG][REG];
  logic [7:0] pu [REG][REG];
  logic [7:0] pv [REG][REG];
  yuv_t       hrow [REG];                  // horizontal row buffer
  wgt_col_t   vw [2][BLK][REG];
  wgt_col_t   hw [2][BLK][BLK];

  logic [2:0] f_start, f_done, f_busy;
  mem_req_t   f_req [3];
  crd_t       bx_q, by_q;
  logic       bank_q;
  int unsigned y, c;


  input_buffer #(.RW(REG), .RH(REG), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_y_buf (
    .clk, .rst_n, .start(f_start[0]), .ox(bx_q - crd_t'(HALF)), .oy(by_q - crd_t'(HALF)),
    .plane_base(base_yl(IMG_W, IMG_H)), .busy(f_busy[0]), .done(f_done[0]), .mreq(f_req[0]),
    .gnt(gnt && f_req[0].req), .rvalid(rvalid && state == S_FETCH_Y), .rdata, .pix(py));
  input_buffer #(.RW(REG), .RH(REG), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_u_buf (
    .clk, .rst_n, .start(f_start[1]), .ox(bx_q - crd_t'(HALF)), .oy(by_q - crd_t'(HALF)),
    .plane_base(base_ul(IMG_W, IMG_H)), .busy(f_busy[1]), .done(f_done[1]), .mreq(f_req[1]),
    .gnt(gnt && f_req[1].req), .rvalid(rvalid && state == S_FETCH_U), .rdata, .pix(pu));
  input_buffer #(.RW(REG), .RH(REG), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_v_buf (
    .clk, .rst_n, .start(f_start[2]), .ox(bx_q - crd_t'(HALF)), .oy(by_q - crd_t'(HALF)),
    .plane_base(base_vl(IMG_W, IMG_H)), .busy(f_busy[2]), .done(f_done[2]), .mreq(f_req[2]),
    .gnt(gnt && f_req[2].req), .rvalid(rvalid && state == S_FETCH_V), .rdata, .pix(pv));

  always_comb begin
    mreq = '0;
    for (int i = 0; i < 3; i++) if (f_req[i].req) mreq = f_req[i];
  end

  // kernel: centre pixel and 31 operands, shared by both passes
  yuv_t     ctr;
  yuv_t     opd [WIN];
  wgt_col_t wcol;

  always_comb begin
    int unsigned cc, yy, xx;
    cc = (c < REG) ? c : 0;
    yy = (y < BLK) ? y : 0;
    xx = (c < BLK) ? c : 0;
    if (state == S_HORZ) begin
      ctr = hrow[xx + HALF];
      for (int i = 0; i < WIN; i++) opd[i] = hrow[xx + i];
    end else begin
      ctr = '{py[yy + HALF][cc], pu[yy + HALF][cc], pv[yy + HALF][cc]};
      for (int i = 0; i < WIN; i++) opd[i] = '{py[yy + i][cc], pu[yy + i][cc], pv[yy + i][cc]};
    end
  end

  for (genvar i = 0; i < WIN; i++) begin : g_w
    color_weight u_cw (.a(opd[i]), .c(ctr), .w(wcol[i]));
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; bx_q <= '0; by_q <= '0; bank_q <= 1'b0;
      y <= 0; c <= 0; f_start <= '0; done <= 1'b0;
    end else begin
      f_start <= '0; done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          bx_q <= bx0; by_q <= by0; bank_q <= wr_bank;
          f_start[0] <= 1'b1; state <= S_FETCH_Y;
        end
        S_FETCH_Y: if (f_done[0]) begin f_start[1] <= 1'b1; state <= S_FETCH_U; end
        S_FETCH_U: if (f_done[1]) begin f_start[2] <= 1'b1; state <= S_FETCH_V; end
        S_FETCH_V: if (f_done[2]) begin y <= 0; c <= 0; state <= S_VERT; end
        S_VERT: begin
          if (c == REG - 1) begin c <= 0; state <= S_HORZ; end
          else c <= c + 1;
        end
        S_HORZ: begin
          if (c == BLK - 1) begin
            c <= 0;
            if (y == BLK - 1) begin state <= S_IDLE; done <= 1'b1; end
            else begin y <= y + 1; state <= S_VERT; end
          end else c <= c + 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_VERT) begin
      vw[bank_q][y][c] <= wcol;
      hrow[c]          <= ctr;
    end
    if (state == S_HORZ) hw[bank_q][y][c] <= wcol;
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) vw_o[l] <= vw[rd_bank][rd_y][int'(rd_grp) * LANES + l];
    for (int j = 0; j < NWTA; j++)  hw_o[j] <= hw[rd_bank][hrd_y][int'(hrd_k) * NWTA + j];
  end
endmodule
