// tb_horizontal_aggregator -- random vertical costs (including the largest
// possible) and weight codes; the final cost must equal sum vcost_j * w_j.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_horizontal_aggregator;
  import mcadsw_pkg::*;
  logic [WIN-1:0][VC_W-1:0] vcost;
  wgt_col_t hw;
  logic [FC_W-1:0] fcost;
  int checks = 0, failures = 0;

  horizontal_aggregator dut (.vcost, .hw, .fcost);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint e;
      e = 0;
      for (int i = 0; i < WIN; i++) begin
        vcost[i] = (n == 0) ? VC_W'(31 * 6 * 64) : VC_W'($urandom_range(0, 31 * 6 * 64));
        hw[i]    = (n == 0) ? 3'd7 : 3'($urandom);
        e += longint'(vcost[i]) * ((hw[i] == 0) ? 0 : (1 << (hw[i] - 1)));
      end
      #1;
      checks++;
      if (longint'(fcost) != e) begin failures++; $display("FAIL got %0d exp %0d", fcost, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
