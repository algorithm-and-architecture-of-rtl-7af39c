// memory_controller -- arbiter for the single 32-bit external memory port.
//
// Three requesters: port 0 = disparity FIFO (writes), port 1 = mini-census
// transformer, port 2 = weight generator (reads).  Port 0 always wins (a full
// disparity FIFO would suspend the cost aggregator); ports 1 and 2 share the
// rest round robin: when both ask, the one not served last is granted.  This
// hybrid fixed-priority / round-robin rule is the document's; the handshake
// is this design's: a requester holds req/addr until gnt, a request is
// accepted in a cycle where mem_ready is high, and read data come back on
// rdata_o with rvalid_o[port] in the next cycle.
module memory_controller
  import mcadsw_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mem_req_t [2:0]    req_i,
  output logic     [2:0]    gnt_o,
  output logic     [2:0]    rvalid_o,
  output logic     [31:0]   rdata_o,
  // external memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic              mem_ready,
  input  logic [31:0]       mem_rdata
);
  logic [1:0] sel;
  logic       last_rr;   // 1: port 1 was served last among ports 1/2

  always_comb begin
    sel = 2'd0;
    if (req_i[0].req)                      sel = 2'd0;
    else if (req_i[1].req && req_i[2].req) sel = last_rr ? 2'd2 : 2'd1;
    else if (req_i[1].req)                 sel = 2'd1;
    else if (req_i[2].req)                 sel = 2'd2;
    mem_req   = req_i[sel].req;
    mem_we    = req_i[sel].we;
    mem_addr  = req_i[sel].addr;
    mem_wdata = req_i[sel].wdata;
    gnt_o     = '0;
    gnt_o[sel] = mem_req && mem_ready;
  end

  assign rdata_o = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_rr  <= 1'b0;
      rvalid_o <= '0;
    end else begin
      rvalid_o <= gnt_o & {3{!mem_we}};
      if (gnt_o[1]) last_rr <= 1'b1;
      if (gnt_o[2]) last_rr <= 1'b0;
    end
  end

  // A granted read must not be a write on the FIFO port and vice versa.
  a_fifo_writes: assert property (@(posedge clk) disable iff (!rst_n)
    gnt_o[0] |-> mem_we);
  a_readers_read: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt_o[1] || gnt_o[2]) |-> !mem_we);
endmodule
