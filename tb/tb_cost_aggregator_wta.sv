// tb_cost_aggregator_wta -- drives the aggregator with random census and
// weight buffers (modelled here with the same one-cycle registered read) at
// the full disparity range, and checks
//   * all 324 disparities of the block against a two-pass reference,
//   * the schedule: first WTA update 7 cycles after start, and the block
//     done after 18 * (7 + 6*64) = 7038 cycles when the output is never
//     blocked,
//   * a second block with the output blocked for long stretches: the
//     aggregator must stall (counted) and still give the same results.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_cost_aggregator_wta;
  import mcadsw_pkg::*;
  localparam int DM = 64, RC = REG + DM - 1;
  logic clk = 0, rst_n = 0, start = 0, busy, done, stall, out_valid, out_ready = 1;
  crd_t bx0, by0, out_x, out_y;
  logic [4:0] rd_y, hrd_y;
  logic [2:0] rd_grp, hrd_k;
  logic [5:0] rd_d, out_d;
  cen_col_t [LANES-1:0] mcl_i, mcr_i;
  wgt_col_t [LANES-1:0] vw_i;
  wgt_col_t [NWTA-1:0]  hw_i;
  logic [5:0] mcl [REG][REG];
  logic [5:0] mcr [REG][RC];
  logic [2:0] vw [BLK][REG][WIN];
  logic [2:0] hw [BLK][BLK][WIN];
  int expd [BLK][BLK];
  int checks = 0, failures = 0, n_stall = 0, n_out = 0;

  cost_aggregator_wta #(.DMAX(DM)) dut (
    .clk, .rst_n, .start, .bx0, .by0, .busy, .done, .stall, .rd_y, .rd_grp, .rd_d, .hrd_y, .hrd_k,
    .mcl_i, .mcr_i, .vw_i, .hw_i, .out_valid, .out_ready, .out_x, .out_y, .out_d);
  always #5 clk = ~clk;

  // buffer models with registered reads
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      for (int i = 0; i < WIN; i++) begin
        mcl_i[l][i] <= mcl[rd_y + i][rd_grp * LANES + l];
        mcr_i[l][i] <= mcr[rd_y + i][rd_grp * LANES + l + DM - 1 - rd_d];
        vw_i[l][i]  <= vw[rd_y][rd_grp * LANES + l][i];
      end
    for (int j = 0; j < NWTA; j++)
      for (int i = 0; i < WIN; i++) hw_i[j][i] <= hw[hrd_y][hrd_k * NWTA + j][i];
  end

  function automatic int wv(logic [2:0] c); return (c == 0) ? 0 : (1 << (c - 1)); endfunction

  task automatic make_block(int seed);
    longint vc [BLK][REG][DM];
    void'($urandom(seed));
    foreach (mcl[r, c]) mcl[r][c] = 6'($urandom);
    foreach (mcr[r, c]) mcr[r][c] = 6'($urandom);
    foreach (vw[y, c, i]) vw[y][c][i] = 3'($urandom_range(0, 7));
    foreach (hw[y, x, i]) hw[y][x][i] = 3'($urandom_range(0, 7));
    foreach (vc[y, c, d]) begin
      vc[y][c][d] = 0;
      for (int i = 0; i < WIN; i++)
        vc[y][c][d] += $countones(mcl[y + i][c] ^ mcr[y + i][c + DM - 1 - d]) * wv(vw[y][c][i]);
    end
    foreach (expd[y, x]) begin
      longint best = -1, f;
      for (int d = 0; d < DM; d++) begin
        f = 0;
        for (int j = 0; j < WIN; j++) f += vc[y][x + j][d] * wv(hw[y][x][j]);
        if (best < 0 || f < best) begin best = f; expd[y][x] = d; end
      end
    end
  endtask

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int x, y;
    x = int'(out_x - bx0); y = int'(out_y - by0);
    n_out++;
    checks++;
    if (x < 0 || x >= BLK || y < 0 || y >= BLK || int'(out_d) != expd[y][x]) begin
      failures++;
      if (failures < 10) $display("FAIL pixel (%0d,%0d) got %0d exp %0d", x, y, out_d, expd[y][x]);
    end
  end
  always @(posedge clk) if (stall) n_stall++;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, first_h;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // block 1: output never blocked
    make_block(1);
    @(negedge clk);
    bx0 = 36; by0 = 54; start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    cyc = 0; first_h = -1;
    while (!done) begin
      if (first_h < 0 && dut.hv) first_h = cyc;
      @(posedge clk); cyc++;
      #1;
    end
    $display("block done after %0d cycles, first WTA update at cycle %0d", cyc, first_h);
    chk(cyc == BLK * (7 + NGRP * DM), "block cycle count");
    chk(first_h == 7, "initial pipeline delay");
    repeat (40) @(posedge clk);
    chk(n_out == BLK * BLK, "all disparities of block 1 out");
    chk(n_stall == 0, "no stall without back-pressure");
    // block 2: output blocked in long stretches
    make_block(2);
    n_out = 0;
    @(negedge clk);
    bx0 = 0; by0 = 0; start = 1;
    @(negedge clk) start = 0;
    fork
      begin
        while (!done) @(posedge clk);
      end
      begin
        forever begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 99) < 3);
        end
      end
    join_any
    disable fork;
    out_ready = 1;
    repeat (40) @(posedge clk);
    chk(n_out == BLK * BLK, "all disparities of block 2 out");
    chk(n_stall > 0, "aggregator stalled under back-pressure");
    $display("stall cycles %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
