// tb_wta_unit -- streams 64 disparities of random costs into the six slots in
// the aggregator's order (d outer, slot inner) and checks that each slot ends
// with the disparity of the smallest cost (smallest d on ties); repeated
// rounds check that d = 0 restarts a slot.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_wta_unit;
  import mcadsw_pkg::*;
  localparam int DMAX = 64;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [2:0] slot;
  logic [5:0] d;
  logic [FC_W-1:0] cost;
  logic [NSLOT-1:0][5:0] best_d;
  int checks = 0, failures = 0;

  wta_unit #(.DMAX(DMAX)) dut (.clk, .rst_n, .valid, .slot, .d, .cost, .best_d);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int bc[NSLOT], bd[NSLOT];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      for (int dd = 0; dd < DMAX; dd++)
        for (int k = 0; k < NSLOT; k++) begin
          int c;
          c = (round % 2) ? $urandom_range(0, 40) : $urandom_range(0, 1 << 20);
          @(negedge clk);
          valid = 1; slot = 3'(k); d = 6'(dd); cost = FC_W'(c);
          if (dd == 0 || c < bc[k]) begin bc[k] = c; bd[k] = dd; end
        end
      @(negedge clk) valid = 0;
      // idle cycles with garbage must not change anything
      slot = 3'd2; d = 6'd0; cost = '0;
      @(negedge clk);
      for (int k = 0; k < NSLOT; k++) begin
        checks++;
        if (int'(best_d[k]) != bd[k]) begin
          failures++; $display("FAIL round %0d slot %0d got %0d exp %0d", round, k, best_d[k], bd[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
