// tb_mini_census -- checks the mini-census of the two worked example pixels
// (bit strings 111000 and 111011) and of random pixels against a direct
// comparison model.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_mini_census;
  import mcadsw_pkg::*;
  logic [7:0] center;
  logic [5:0][7:0] nb;
  logic [5:0] code;
  int checks = 0, failures = 0;

  mini_census dut (.center, .nb, .code);

  task automatic check(logic [5:0] exp);
    #1;
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL center=%0d nb=%p code=%b exp=%b", center, nb, code, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    center = 34; nb = {8'd5, 8'd7, 8'd19, 8'd41, 8'd38, 8'd52}; check(6'b111000);
    center = 49; nb = {8'd9, 8'd40, 8'd47, 8'd53, 8'd42, 8'd47}; check(6'b111011);
    center = 10; nb = {6{8'd10}}; check(6'b111111);   // equal counts as "not larger"
    for (int n = 0; n < 2000; n++) begin
      logic [5:0] e;
      center = 8'($urandom);
      for (int i = 0; i < 6; i++) nb[i] = (n % 3 == 0) ? center + 8'($urandom_range(0, 2)) - 8'd1 : 8'($urandom);
      for (int i = 0; i < 6; i++) e[i] = !(int'(nb[i]) > int'(center));
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
