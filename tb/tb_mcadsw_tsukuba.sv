// tb_mcadsw_tsukuba -- one whole frame at the size of the Tsukuba stereo
// pair (384x288, true disparities below 16).  The hardware is left as built
// (64-level search, 18x18 blocks) except for the image width, IMG_W = 384,
// which is a multiple of 4 as the memory layout requires.  The test pair is
// synthetic (the real images are not part of this repository), with scene
// shifts of at most 9 pixels, so the 64-level search must reject the larger
// disparities.  Checks that every pixel of the map is written exactly once,
// compares a sample of pixels with the reference model, and checks the frame
// time: 22 x 16 = 352 blocks of 7038 cycles plus the first preparation
// (about 38 frames/s at 95 MHz).
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_mcadsw_tsukuba;
  import mcadsw_pkg::*;
  import mcadsw_ref_pkg::*;
  localparam int IW = 384, IH = 288, DM = 64, NBLK = 22 * 16, PW = IW * IH / 4;
  localparam int DBASE = 4 * PW;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic mem_req, mem_we, mem_ready = 1;
  logic [ADDR_W-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] img_words[];
  int nwr [IW * IH];
  int checks = 0, failures = 0;

  mcadsw_top #(.IMG_W(IW)) dut (
    .clk, .rst_n, .start, .busy, .done, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ready, .mem_rdata);
  ext_memory_model #(.AW(ADDR_W), .DEPTH(1 << 18)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .ready(mem_ready), .rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(negedge clk) mem_ready = ($urandom_range(0, 19) != 0);

  always @(posedge clk) if (rst_n && mem_req && mem_ready && mem_we) begin
    int a;
    a = int'(mem_addr) - DBASE;
    if (a < 0 || a >= IW * IH) begin
      failures++; $display("FAIL write outside the disparity map: %0d", mem_addr);
    end else nwr[a]++;
  end

  task automatic check_pixel(int x, int y);
    int e, got;
    e = disparity(x, y);
    got = int'(u_mem.mem[DBASE + y * IW + x]);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d", x, y, got, e);
    end
  endtask

  initial begin
    #100000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc = 0, bad = 0;
    make_images(IW, IH, 16, 9);
    mcadsw_ref_pkg::DM = DM;
    img_words = new[4 * PW];
    pack(img_words, PW);
    for (int i = 0; i < 4 * PW; i++) u_mem.mem[i] = img_words[i];
    for (int i = 0; i < IW * IH; i++) u_mem.mem[DBASE + i] = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(posedge clk); cyc++; end
    $display("frame done after %0d cycles (%0.1f frames/s at 95 MHz)", cyc, 95.0e6 / real'(cyc));
    $display("memory words read %0d (%0.2f per pixel of each plane read), written %0d",
             u_mem.n_reads, real'(u_mem.n_reads) / real'(IW * IH / 4) / 4.0, u_mem.n_writes);
    checks++;
    if (cyc < NBLK * 7038 || cyc > NBLK * 7038 + 20000) begin
      failures++; $display("FAIL frame time %0d cycles", cyc);
    end
    foreach (nwr[i]) if (nwr[i] != 1) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d pixels not written exactly once", bad); end
    for (int i = 0; i < 4; i++) check_pixel((i % 2) * (IW - 1), (i / 2) * (IH - 1));
    for (int i = 0; i < 60; i++) check_pixel($urandom_range(0, IW - 1), $urandom_range(0, IH - 1));
    for (int x = 0; x < IW; x += 7) check_pixel(x, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
