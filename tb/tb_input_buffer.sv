// tb_input_buffer -- fetches windows at several origins (inside the image,
// overlapping every border, larger than the image) from a memory model that
// is randomly not ready, and compares every window pixel with the image pixel
// at the clamped coordinates.  Also checks that exactly the words the window
// touches are read.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_input_buffer;
  import mcadsw_pkg::*;
  localparam int IW = 40, IH = 32, RW = 20, RH = 12;
  logic clk = 0, rst_n = 0, start = 0, busy, done, gnt, rvalid = 0, ready;
  crd_t ox, oy;
  mem_req_t mreq;
  logic [31:0] rdata;
  logic [7:0] pix [RH][RW];
  byte unsigned img [IH][IW];
  int checks = 0, failures = 0;

  input_buffer #(.RW(RW), .RH(RH), .IMG_W(IW), .IMG_H(IH)) dut (
    .clk, .rst_n, .start, .ox, .oy, .plane_base(ADDR_W'(100)), .busy, .done, .mreq, .gnt, .rvalid, .rdata, .pix);
  ext_memory_model #(.AW(ADDR_W), .DEPTH(1024)) u_mem (
    .clk, .req(mreq.req), .we(mreq.we), .addr(mreq.addr), .wdata(mreq.wdata), .ready, .rdata);

  assign gnt = mreq.req && ready;
  always_ff @(posedge clk) rvalid <= gnt;
  always #5 clk = ~clk;
  always @(negedge clk) ready = $urandom_range(0, 3) != 0;

  function automatic int cl(int v, int hi); return v < 0 ? 0 : (v > hi ? hi : v); endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int org[7][2] = '{'{5, 6}, '{-5, -3}, '{30, 25}, '{-17, 28}, '{25, -9}, '{0, 0}, '{-30, -20}};
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        img[y][x] = byte'($urandom);
        u_mem.mem[100 + y * (IW / 4) + x / 4][8 * (x % 4) +: 8] = img[y][x];
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (org[n]) begin
      int reads0, nw;
      @(negedge clk);
      ox = crd_t'(org[n][0]); oy = crd_t'(org[n][1]); start = 1;
      reads0 = u_mem.n_reads;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      for (int r = 0; r < RH; r++)
        for (int p = 0; p < RW; p++) begin
          checks++;
          if (pix[r][p] != img[cl(org[n][1] + r, IH - 1)][cl(org[n][0] + p, IW - 1)]) begin
            failures++;
            $display("FAIL origin (%0d,%0d) pixel (%0d,%0d) got %0d", org[n][0], org[n][1], p, r, pix[r][p]);
          end
        end
      nw = cl(org[n][0] + RW - 1, IW - 1) / 4 - cl(org[n][0], IW - 1) / 4 + 1;
      checks++;
      if (u_mem.n_reads - reads0 != nw * RH) begin
        failures++; $display("FAIL read count %0d exp %0d", u_mem.n_reads - reads0, nw * RH);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
