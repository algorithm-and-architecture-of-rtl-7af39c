// tb_memory_controller -- random requests on the three ports with a random
// mem_ready.  Checks: the FIFO port always wins; between ports 1 and 2 the
// port not served last wins when both ask; grants only with mem_ready; the
// forwarded request is the granted port's; rvalid follows a read grant by one
// cycle on the right port.  Counts that every kind of contention happened.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_memory_controller;
  import mcadsw_pkg::*;
  logic clk = 0, rst_n = 0;
  mem_req_t [2:0] req;
  logic [2:0] gnt, rvalid;
  logic [31:0] rdata, mem_wdata, mem_rdata;
  logic mem_req, mem_we, mem_ready;
  logic [ADDR_W-1:0] mem_addr;
  int checks = 0, failures = 0, n_pre = 0, n_rr = 0, n_wait = 0;

  memory_controller dut (.clk, .rst_n, .req_i(req), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rdata);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last = 1;       // model: port served last among 1/2 (reset: port 1 not yet served -> 1 wins first)
    logic [2:0] prev_rd = '0;
    req = '0; mem_ready = 0; mem_rdata = '0;
    last = 2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int e;
      @(negedge clk);
      // rvalid of the previous cycle's read grant
      chk(rvalid == prev_rd, "rvalid");
      for (int p = 0; p < 3; p++) begin
        req[p].req   = $urandom_range(0, 2) != 0 && !(p == 0 && $urandom_range(0, 2) != 0);
        req[p].we    = (p == 0);
        req[p].addr  = ADDR_W'($urandom);
        req[p].wdata = $urandom;
      end
      mem_ready = $urandom_range(0, 3) != 0;
      mem_rdata = $urandom;
      #1;
      if (req[0].req) e = 0;
      else if (req[1].req && req[2].req) e = (last == 1) ? 2 : 1;
      else if (req[1].req) e = 1;
      else if (req[2].req) e = 2;
      else e = -1;
      if (req[0].req && (req[1].req || req[2].req)) n_pre++;
      if (!req[0].req && req[1].req && req[2].req) n_rr++;
      if (e >= 0 && !mem_ready) n_wait++;
      chk(gnt == ((e >= 0 && mem_ready) ? 3'(1 << e) : 3'b000), "grant");
      chk(mem_req == (e >= 0), "mem_req");
      if (e >= 0) chk(mem_addr == req[e].addr && mem_we == req[e].we && mem_wdata == req[e].wdata, "forwarded request");
      chk(rdata == mem_rdata, "read data path");
      prev_rd = (e > 0 && mem_ready) ? 3'(1 << e) : 3'b000;
      if (e > 0 && mem_ready) last = e;
    end
    chk(n_pre > 0 && n_rr > 0 && n_wait > 0, "all contention cases seen");
    $display("preempt=%0d roundrobin=%0d waits=%0d", n_pre, n_rr, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
