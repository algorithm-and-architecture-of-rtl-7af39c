// tb_color_weight -- checks the Manhattan distance + weight table against
// 64*exp(-d/7.2) truncated to its leading one (computed with $exp), for
// exhaustive small distances and random colours.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_color_weight;
  import mcadsw_pkg::*;
  yuv_t a, c;
  logic [2:0] w;
  int checks = 0, failures = 0;

  color_weight dut (.a, .c, .w);

  function automatic int ref_weight(int d);
    real v; int r;
    v = 64.0 * $exp(-real'(d) / 7.2);
    if (v < 1.0) return 0;
    r = 1;
    while (real'(r * 2) <= v) r *= 2;
    return r;
  endfunction

  function automatic int absd(int x, int y); return x > y ? x - y : y - x; endfunction

  task automatic check;
    int d, e, got;
    #1;
    d = absd(a.y, c.y) + absd(a.u, c.u) + absd(a.v, c.v);
    e = ref_weight(d);
    got = (w == 0) ? 0 : (1 << (w - 1));
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL d=%0d weight=%0d exp=%0d", d, got, e);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // every distance 0..80 along one component, then mixed components
    for (int d = 0; d <= 80; d++) begin
      c = '{8'd100, 8'd100, 8'd100};
      a = '{8'(100 + d / 3), 8'(100 - (d - d / 3) / 2), 8'(100 + (d - d / 3) - (d - d / 3) / 2)};
      check();
    end
    for (int n = 0; n < 3000; n++) begin
      c = '{8'($urandom), 8'($urandom), 8'($urandom)};
      a = '{c.y + 8'($urandom_range(0, 24)) - 8'd12, c.u + 8'($urandom_range(0, 16)) - 8'd8,
            (n % 4 == 0) ? 8'($urandom) : c.v + 8'($urandom_range(0, 8)) - 8'd4};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
