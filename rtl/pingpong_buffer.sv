// pingpong_buffer -- double buffer of vertical aggregated costs.
//
// Two banks of REG (48) costs.  The vertical lanes write LANES (8) costs per
// cycle into one bank (column group wgrp) while the horizontal side reads the
// other bank: at read step rpos = k it delivers the NOUT (33) costs of
// columns 3k .. 3k+32, which the three horizontal aggregators share (partial
// column reuse: window j uses costs j .. j+30).  Writes are registered; the
// read is combinational from the bank registers.  The caller alternates
// banks per disparity so aggregation never pauses.
//
// Two banks and the 33-cost read for three horizontal aggregators follow the
// document.  Filling a whole bank before it is read, rather than the
// document's staggered schedule, is this design's choice; the throughput is
// the same.
module pingpong_buffer
  import mcadsw_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic                        wbank,
  input  logic [2:0]                  wgrp,
  input  logic [LANES-1:0][VC_W-1:0]  wdata,
  input  logic                        rbank,
  input  logic [2:0]                  rpos,
  output logic [NOUT-1:0][VC_W-1:0]   rdata
);
  logic [1:0][REG-1:0][VC_W-1:0] bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank <= '0;
    else if (we) begin
      for (int l = 0; l < LANES; l++) bank[wbank][int'(wgrp)*LANES + l] <= wdata[l];
    end
  end

  always_comb begin
    for (int i = 0; i < NOUT; i++) begin
      if (int'(rpos)*NWTA + i < REG) rdata[i] = bank[rbank][int'(rpos)*NWTA + i];
      else                           rdata[i] = '0;
    end
  end
endmodule
