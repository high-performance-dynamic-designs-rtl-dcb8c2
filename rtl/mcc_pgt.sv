// mcc_pgt - bit-level signals of the Manchester carry chain adder.
//
// For every bit: generate g_i = a_i b_i, exclusive propagate
// p_i = a_i xor b_i and inclusive propagate ("transmit") t_i = a_i + b_i.
// In the circuit these are domino gates; here they are written as the
// values they hold at the end of the evaluate phase. Purely combinational.
module mcc_pgt #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p,
  output logic [N-1:0] t
);

  assign g = a & b;
  assign p = a ^ b;
  assign t = a | b;

endmodule
