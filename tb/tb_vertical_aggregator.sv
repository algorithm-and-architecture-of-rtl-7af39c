// tb_vertical_aggregator -- random census columns and weight codes; the
// vertical cost must equal sum_i popcount(l_i ^ r_i) * weight_i.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_vertical_aggregator;
  import mcadsw_pkg::*;
  cen_col_t mcl, mcr;
  wgt_col_t vw;
  logic [VC_W-1:0] vcost;
  int checks = 0, failures = 0;

  vertical_aggregator dut (.mcl, .mcr, .vw, .vcost);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int e;
      e = 0;
      for (int i = 0; i < WIN; i++) begin
        mcl[i] = 6'($urandom);
        mcr[i] = (n == 0) ? ~mcl[i] : 6'($urandom);
        vw[i]  = (n == 0) ? 3'd7 : 3'($urandom);
        e += $countones(mcl[i] ^ mcr[i]) * ((vw[i] == 0) ? 0 : (1 << (vw[i] - 1)));
      end
      #1;
      checks++;
      if (int'(vcost) != e) begin failures++; $display("FAIL got %0d exp %0d", vcost, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
