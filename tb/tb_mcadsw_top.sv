// tb_mcadsw_top -- end-to-end test of the disparity engine on a reduced frame
// (40x36 pixels, 8 disparities; 3x2 blocks of which the last column is only
// partly inside the image).  A synthetic stereo pair is put in the memory
// model, one frame is run, and every disparity written back is compared with
// the algorithm's reference; a disparity not written, or written twice,
// counts as a failure.  The memory is randomly not ready, with one long
// outage, so that every mechanism is exercised; each one is counted and must
// have happened at least once:
//   overlap   census/weight preparation of block s during aggregation of s-1
//   rr        census transformer and weight generator asking together
//   fifo_pri  disparity FIFO served while a preparation unit was waiting
//   mem_wait  a request held because the memory was not ready
//   fifo_full the disparity FIFO full
//   stall     the aggregator waiting for its output latch to drain
//   drop      an output outside the image discarded
//   bank1     aggregation from census/weight bank 1 (banks alternate)
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_mcadsw_top;
  import mcadsw_pkg::*;
  import mcadsw_ref_pkg::*;
  localparam int IW = 40, IH = 36, DM = 8, PW = IW * IH / 4;
  localparam int DBASE = 4 * PW;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic mem_req, mem_we, mem_ready = 1;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] img_words[];
  int nwr [IW * IH];
  int checks = 0, failures = 0;
  int n_overlap = 0, n_rr = 0, n_fifo_pri = 0, n_mem_wait = 0, n_fifo_full = 0, n_stall = 0, n_drop = 0, n_bank1 = 0;
  bit outage = 0;

  mcadsw_top #(.IMG_W(IW), .IMG_H(IH), .DMAX(DM)) dut (
    .clk, .rst_n, .start, .busy, .done, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rdata);
  ext_memory_model #(.AW(ADDR_W), .DEPTH(8192)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .ready(mem_ready), .rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(negedge clk) mem_ready = !outage && ($urandom_range(0, 9) < 8);

  always @(posedge clk) if (rst_n) begin
    if (dut.mct_busy && dut.agg_busy) n_overlap++;
    if (dut.mreq[1].req && dut.mreq[2].req) n_rr++;
    if (dut.gnt[0] && (dut.mreq[1].req || dut.mreq[2].req)) n_fifo_pri++;
    if (mem_req && !mem_ready) n_mem_wait++;
    if (dut.f_full) n_fifo_full++;
    if (dut.agg_stall) n_stall++;
    if (dut.out_valid && !dut.in_img) n_drop++;
    if (dut.agg_busy && dut.agg_bank) n_bank1++;
    if (mem_req && mem_ready && mem_we) begin
      int a;
      a = int'(mem_addr) - DBASE;
      if (a < 0 || a >= IW * IH) begin
        failures++; $display("FAIL write outside the disparity map: %0d", mem_addr);
      end else nwr[a]++;
    end
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc = 0;
    make_images(IW, IH, DM, 3);
    img_words = new[4 * PW];
    pack(img_words, PW);
    for (int i = 0; i < 4 * PW; i++) u_mem.mem[i] = img_words[i];
    for (int i = 0; i < IW * IH; i++) u_mem.mem[DBASE + i] = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(posedge clk); cyc++;
      outage = (cyc >= 3000 && cyc < 4200);
    end
    $display("frame done after %0d cycles", cyc);
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        int e, got;
        e = disparity(x, y);
        got = int'(u_mem.mem[DBASE + y * IW + x]);
        checks++;
        if (got != e || nwr[y * IW + x] != 1) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d writes %0d", x, y, got, e, nwr[y * IW + x]);
        end
      end
    need(n_overlap, "overlap"); need(n_rr, "rr"); need(n_fifo_pri, "fifo_pri");
    need(n_mem_wait, "mem_wait"); need(n_fifo_full, "fifo_full"); need(n_stall, "stall");
    need(n_drop, "drop"); need(n_bank1, "bank1");
    $display("overlap=%0d rr=%0d fifo_pri=%0d mem_wait=%0d fifo_full=%0d stall=%0d drop=%0d bank1=%0d",
             n_overlap, n_rr, n_fifo_pri, n_mem_wait, n_fifo_full, n_stall, n_drop, n_bank1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
