// tb_disparity_fifo -- random push/pop against a queue model, with phases
// that fill the FIFO to full and drain it to empty.
//
// Expected values are worked out here, independently of the RTL; the test
// sizes, random stimulus and seeds are this testbench's own choices.
module tb_disparity_fifo;
  localparam int DEPTH = 32, W = 26;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] din, dout;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, nfull = 0;

  disparity_fifo #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .push, .din, .full, .pop, .dout, .empty, .count);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int ph;  // 0: mostly push, 1: mostly pop, 2: mixed
      ph = (n / 500) % 3;
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(count) != q.size()) begin
        failures++; $display("FAIL flags size=%0d count=%0d e=%b f=%b", q.size(), count, empty, full);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("FAIL data %h exp %h", dout, q[0]); end
      end
      if (full) nfull++;
      push = (ph == 0) ? ($urandom_range(0, 9) < 8) : (ph == 1) ? ($urandom_range(0, 9) < 2) : $urandom_range(0, 1);
      pop  = (ph == 1) ? ($urandom_range(0, 9) < 8) : (ph == 0) ? ($urandom_range(0, 9) < 2) : $urandom_range(0, 1);
      din  = W'($urandom);
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && q.size() < DEPTH + (pop ? 1 : 0) && !full) q.push_back(din);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
