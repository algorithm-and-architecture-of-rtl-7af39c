// input_buffer -- window fetch buffer for one 8-bit image plane.
//
// On start it reads the RH x RW pixel window whose top-left pixel is image
// position (ox, oy) from external memory, one 32-bit word (four pixels) per
// granted request, row by row.  Only the words the window touches are read.
// Each returned word is unpacked by a per-column selector ("shifter"): window
// column p takes byte (cx(p) mod 4) of the word when cx(p)/4 is the word just
// returned, with cx(p) = ox + p clamped into the image.  Rows are clamped the
// same way, so window pixels outside the image repeat the nearest border
// pixel (border handling is this design's choice).  done pulses when the last
// word has been written; pix then holds the window until the next start.
//
// Memory handshake: mreq is held until gnt; rvalid/rdata arrive the cycle
// after the grant (see memory_controller).
module input_buffer
  import mcadsw_pkg::*;
#(
  parameter int RW    = 52,
  parameter int RH    = 52,
  parameter int IMG_W = 352,
  parameter int IMG_H = 288
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  crd_t              ox,
  input  crd_t              oy,
  input  logic [ADDR_W-1:0] plane_base,
  output logic              busy,
  output logic              done,
  output mem_req_t          mreq,
  input  logic              gnt,
  input  logic              rvalid,
  input  logic [31:0]       rdata,
  output logic [7:0]        pix [RH][RW]
);
  localparam int WPR = IMG_W / 4;   // words per image row

  crd_t        ox_q, oy_q;
  logic [ADDR_W-1:0] base_q;
  int unsigned row, word, wlo, whi;  // request pointer
  int unsigned prow, pword;          // word whose data return next cycle
  logic        issuing, pend_last;
  crd_t        cx [RW];

  // clamped source column of each window column
  always_comb begin
    for (int p = 0; p < RW; p++) cx[p] = clampc(ox_q + crd_t'(p), IMG_W - 1);
  end

  assign wlo = int'(clampc(ox_q, IMG_W - 1)) / 4;
  assign whi = int'(clampc(ox_q + crd_t'(RW - 1), IMG_W - 1)) / 4;

  always_comb begin
    mreq       = '0;
    mreq.req   = issuing;
    mreq.we    = 1'b0;
    mreq.addr  = base_q + ADDR_W'(int'(clampc(oy_q + crd_t'(row), IMG_H - 1)) * WPR + int'(word));
  end

  assign busy = issuing || pend_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ox_q <= '0; oy_q <= '0; base_q <= '0;
      row <= 0; word <= 0; prow <= 0; pword <= 0;
      issuing <= 1'b0; pend_last <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        ox_q    <= ox;
        oy_q    <= oy;
        base_q  <= plane_base;
        row     <= 0;
        word    <= int'(clampc(ox, IMG_W - 1)) / 4;
        issuing <= 1'b1;
      end else if (issuing && gnt) begin
        prow  <= row;
        pword <= word;
        if (word == whi) begin
          word <= wlo;
          if (row == RH - 1) begin
            issuing   <= 1'b0;
            pend_last <= 1'b1;
          end else row <= row + 1;
        end else word <= word + 1;
      end
      if (rvalid && pend_last && !(issuing && gnt)) begin
        pend_last <= 1'b0;
        done      <= 1'b1;
      end
    end
  end

  // unpack the returned word into every window column it feeds
  always_ff @(posedge clk) begin
    if (rvalid) begin
      for (int p = 0; p < RW; p++) begin
        if (int'(cx[p]) / 4 == int'(pword))
          pix[prow][p] <= rdata[8 * (int'(cx[p]) % 4) +: 8];
      end
    end
  end
endmodule
