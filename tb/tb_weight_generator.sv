// tb_weight_generator -- prepares two blocks (bank 0 at the top-left corner,
// bank 1 inside the image) from a memory model with random wait states, then
// reads every vertical and horizontal weight of both banks through the read
// ports and compares it with the reference weight 64*exp(-d/7.2) (leading one
// kept) of the YUV Manhattan distance, computed on the clamped image.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_weight_generator;
  import mcadsw_pkg::*;
  import mcadsw_ref_pkg::*;
  localparam int IW = 40, IH = 40, PW = IW * IH / 4;
  logic clk = 0, rst_n = 0, start = 0, wr_bank = 0, busy, done, gnt, rvalid = 0, ready;
  crd_t bx0, by0;
  mem_req_t mreq;
  logic [31:0] rdata;
  logic rd_bank = 0;
  logic [4:0] rd_y = 0, hrd_y = 0;
  logic [2:0] rd_grp = 0, hrd_k = 0;
  wgt_col_t [LANES-1:0] vw_o;
  wgt_col_t [NWTA-1:0]  hw_o;
  int checks = 0, failures = 0;
  logic [31:0] img_words[];

  weight_generator #(.IMG_W(IW), .IMG_H(IH)) dut (
    .clk, .rst_n, .start, .bx0, .by0, .wr_bank, .busy, .done, .mreq, .gnt, .rvalid, .rdata,
    .rd_bank, .rd_y, .rd_grp, .vw_o, .hrd_y, .hrd_k, .hw_o);
  ext_memory_model #(.AW(ADDR_W), .DEPTH(8 * PW)) u_mem (
    .clk, .req(mreq.req), .we(mreq.we), .addr(mreq.addr), .wdata(mreq.wdata), .ready, .rdata);

  assign gnt = mreq.req && ready;
  always_ff @(posedge clk) rvalid <= gnt;
  always #5 clk = ~clk;
  always @(negedge clk) ready = $urandom_range(0, 4) != 0;

  function automatic int wval(logic [2:0] c); return (c == 0) ? 0 : (1 << (c - 1)); endfunction

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
    $display("block (%0d,%0d) weights in %0d cycles", x0, y0, t0);
  endtask

  task automatic verify(int x0, int y0, bit bank);
    for (int y = 0; y < BLK; y++)
      for (int g = 0; g < NGRP; g++) begin
        @(negedge clk);
        rd_bank = bank; rd_y = 5'(y); rd_grp = 3'(g); hrd_y = 5'(y); hrd_k = 3'(g);
        @(negedge clk);
        for (int l = 0; l < LANES; l++)
          for (int i = 0; i < WIN; i++) begin
            int cx = x0 - HALF + g * LANES + l, e;
            e = weight_of(cdist(cx, y0 - HALF + y + i, cx, y0 + y));
            checks++;
            if (wval(vw_o[l][i]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL VW col %0d row %0d i %0d got %0d exp %0d", cx, y0 + y, i, wval(vw_o[l][i]), e);
            end
          end
        for (int j = 0; j < NWTA; j++)
          for (int i = 0; i < WIN; i++) begin
            int x = x0 + g * NWTA + j, e;
            e = weight_of(cdist(x - HALF + i, y0 + y, x, y0 + y));
            checks++;
            if (wval(hw_o[j][i]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL HW x %0d y %0d i %0d got %0d exp %0d", x, y0 + y, i, wval(hw_o[j][i]), e);
            end
          end
      end
  endtask

  initial begin
    make_images(IW, IH, 8, 11);
    img_words = new[4 * PW];
    pack(img_words, PW);
    for (int i = 0; i < 4 * PW; i++) u_mem.mem[i] = img_words[i];
    repeat (2) @(posedge clk);
    rst_n = 1;
    prepare(0, 0, 1'b0);
    prepare(18, 18, 1'b1);
    verify(0, 0, 1'b0);
    verify(18, 18, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
