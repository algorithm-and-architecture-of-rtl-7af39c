// tb_pingpong_buffer -- writes six 8-cost groups into one bank while reading
// the 33-cost windows of the other bank (as the aggregator does, alternating
// banks every 6 cycles) and compares every window with a model.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_pingpong_buffer;
  import mcadsw_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, wbank = 0, rbank = 0;
  logic [2:0] wgrp = 0, rpos = 0;
  logic [LANES-1:0][VC_W-1:0] wdata;
  logic [NOUT-1:0][VC_W-1:0]  rdata;
  int model [2][REG];
  int checks = 0, failures = 0;

  pingpong_buffer dut (.clk, .rst_n, .we, .wbank, .wgrp, .wdata, .rbank, .rpos, .rdata);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 40; d++) begin
      for (int g = 0; g < NGRP; g++) begin
        @(negedge clk);
        we = 1; wbank = 1'(d % 2); wgrp = 3'(g);
        for (int l = 0; l < LANES; l++) wdata[l] = VC_W'($urandom);
        rbank = 1'((d + 1) % 2); rpos = 3'(g);
        #1;
        // window of the bank completed in the previous round
        if (d > 0) begin
          for (int i = 0; i < NOUT; i++) begin
            int e;
            e = (g * NWTA + i < REG) ? model[(d + 1) % 2][g * NWTA + i] : 0;
            checks++;
            if (int'(rdata[i]) != e) begin
              failures++; $display("FAIL d=%0d k=%0d i=%0d got %0d exp %0d", d, g, i, rdata[i], e);
            end
          end
        end
        @(posedge clk);
        for (int l = 0; l < LANES; l++) model[d % 2][g * LANES + l] = int'(wdata[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
