// ext_memory_model -- behavioural model of the off-chip image/disparity
// memory: 32-bit words, a request is taken when req && ready, read data
// appear on rdata in the next cycle, writes land at the clock edge.  ready
// comes from the testbench (to model a busy memory).  Not synthesizable
// intent; testbench use only.
//
// The document gives only the 32-bit memory port; the ready handshake and
// the one-cycle read latency are this design's choices.
module ext_memory_model #(
  parameter int AW    = 20,
  parameter int DEPTH = 1 << 20
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  input  logic          ready,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];
  int unsigned n_reads = 0, n_writes = 0;

  always_ff @(posedge clk) begin
    if (req && ready) begin
      if (we) begin mem[addr] <= wdata; n_writes <= n_writes + 1; end
      else    begin rdata <= mem[addr]; n_reads <= n_reads + 1; end
    end
  end
endmodule
