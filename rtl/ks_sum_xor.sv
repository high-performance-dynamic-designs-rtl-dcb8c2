// ks_sum_xor - sum unit (the "diamond" XOR) of the Kogge-Stone adder.
//
// Static logic reading the last pipeline level while it holds its values
// (memory phase): s_i = (A_i xor B_i) xor c_{i-1}, with c_{i-1} = G_{i-1:0}
// the prefix generate of the bits below i and no carry into bit 0. The carry
// out is G_{N-1:0}. INV = 1 when the last level delivers inverted signals
// (an odd level count, five for 16 bits). The XOR sum follows the document;
// reading it from the last level's memory phase is this design's choice.
module ks_sum_xor #(
  parameter int unsigned N   = 16,
  parameter bit          INV = 1'b1
) (
  input  logic [N-1:0] x_n,   // half-sum bits, inverted if INV
  input  logic [N-1:0] g_n,   // prefix generates G_{i:0}, inverted if INV
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] x, c;

  assign x    = INV ? ~x_n : x_n;
  assign c    = INV ? ~g_n : g_n;
  assign sum  = x ^ {c[N-2:0], 1'b0};
  assign cout = c[N-1];

endmodule
