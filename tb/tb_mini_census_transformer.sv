// tb_mini_census_transformer -- prepares two blocks (one at the image's left
// border in bank 0, one at the bottom-right in bank 1) from a memory model
// with random wait states, then reads both banks through the read port for
// every output row, column group and disparity and compares each census with
// the reference mini-census of the clamped image.  Reduced image and DMAX.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_mini_census_transformer;
  import mcadsw_pkg::*;
  import mcadsw_ref_pkg::*;
  localparam int IW = 40, IH = 32, DM = 8, PW = IW * IH / 4;
  logic clk = 0, rst_n = 0, start = 0, wr_bank = 0, busy, done, gnt, rvalid = 0, ready;
  crd_t bx0, by0;
  mem_req_t mreq;
  logic [31:0] rdata;
  logic rd_bank = 0;
  logic [4:0] rd_y = 0;
  logic [2:0] rd_grp = 0;
  logic [2:0] rd_d = 0;
  cen_col_t [LANES-1:0] mcl_o, mcr_o;
  int checks = 0, failures = 0;
  logic [31:0] img_words[];

  mini_census_transformer #(.IMG_W(IW), .IMG_H(IH), .DMAX(DM)) dut (
    .clk, .rst_n, .start, .bx0, .by0, .wr_bank, .busy, .done, .mreq, .gnt, .rvalid, .rdata,
    .rd_bank, .rd_y, .rd_grp, .rd_d, .mcl_o, .mcr_o);
  ext_memory_model #(.AW(ADDR_W), .DEPTH(8 * PW)) u_mem (
    .clk, .req(mreq.req), .we(mreq.we), .addr(mreq.addr), .wdata(mreq.wdata), .ready, .rdata);

  assign gnt = mreq.req && ready;
  always_ff @(posedge clk) rvalid <= gnt;
  always #5 clk = ~clk;
  always @(negedge clk) ready = $urandom_range(0, 4) != 0;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic prepare(int x0, int y0, bit bank);
    int t0 = 0;
    @(negedge clk);
    bx0 = crd_t'(x0); by0 = crd_t'(y0); wr_bank = bank; start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(posedge clk); t0++; end
    $display("block (%0d,%0d) prepared in %0d cycles", x0, y0, t0);
  endtask

  task automatic verify(int x0, int y0, bit bank);
    for (int y = 0; y < BLK; y++)
      for (int g = 0; g < NGRP; g++)
        for (int d = 0; d < DM; d++) begin
          @(negedge clk);
          rd_bank = bank; rd_y = 5'(y); rd_grp = 3'(g); rd_d = 3'(d);
          @(negedge clk);
          for (int l = 0; l < LANES; l++)
            for (int i = 0; i < WIN; i++) begin
              int cx = x0 - HALF + g * LANES + l, cy = y0 - HALF + y + i;
              checks += 2;
              if (int'(mcl_o[l][i]) != census(1'b0, cx, cy)) begin
                failures++;
                if (failures < 10) $display("FAIL L x=%0d y=%0d got %b exp %b", cx, cy, mcl_o[l][i], 6'(census(1'b0, cx, cy)));
              end
              if (int'(mcr_o[l][i]) != census(1'b1, cx - d, cy)) begin
                failures++;
                if (failures < 10) $display("FAIL R x=%0d y=%0d got %b exp %b", cx - d, cy, mcr_o[l][i], 6'(census(1'b1, cx - d, cy)));
              end
            end
        end
  endtask

  initial begin
    make_images(IW, IH, DM, 7);
    img_words = new[4 * PW];
    pack(img_words, PW);
    for (int i = 0; i < 4 * PW; i++) u_mem.mem[i] = img_words[i];
    repeat (2) @(posedge clk);
    rst_n = 1;
    prepare(0, 18, 1'b0);
    prepare(36, 18, 1'b1);
    verify(0, 18, 1'b0);
    verify(36, 18, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
