// hamming_cost -- census matching cost: Hamming distance between a left and a
// right 6-bit mini-census string (0..6).  Combinational.
//
// Census matching by Hamming distance is the document's; computing it as
// the popcount of an XOR is this design's own (and the obvious) choice.
module hamming_cost
  import mcadsw_pkg::*;
(
  input  logic [CEN_W-1:0] a,
  input  logic [CEN_W-1:0] b,
  output logic [2:0]       cost
);
  always_comb begin
    cost = '0;
    for (int i = 0; i < CEN_W; i++) cost += 3'(a[i] ^ b[i]);
  end
endmodule
