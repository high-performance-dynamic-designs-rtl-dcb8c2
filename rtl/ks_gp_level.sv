// ks_gp_level - first gate level of the pipelined Kogge-Stone adder.
//
// The "square" unit of the adder: for every bit a dynamic NAND gate gives the
// inverted generate ~G_i = ~(A_i B_i) and a dynamic NOR gate the inverted
// propagate ~P_i = ~(A_i + B_i) (inclusive propagate, as the document uses
// for this adder). A third dynamic gate per bit gives the inverted half-sum
// ~(A_i xor B_i), which is carried down the pipeline to form the sum bits;
// placing it in this level is a choice of this design (it needs both
// polarities of A and B, assumed available).
//
// Interface and timing: the level is clocked by CLK1 (evaluate) and CLK2
// (precharge). A and B must be stable during the evaluate phase time; the
// outputs are valid in the following (memory) phase time, when level 2
// evaluates. All outputs are precharged high.
module ks_gp_level #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         clk_n,
  input  logic         clk_p_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g_n,
  output logic [N-1:0] p_n,
  output logic [N-1:0] x_n
);

  mlp_dyn_node #(.WIDTH(N)) u_g (
    .clk, .clk_n, .clk_p_n, .pd(a & b), .out(g_n));

  mlp_dyn_node #(.WIDTH(N)) u_p (
    .clk, .clk_n, .clk_p_n, .pd(a | b), .out(p_n));

  mlp_dyn_node #(.WIDTH(N)) u_x (
    .clk, .clk_n, .clk_p_n, .pd(a ^ b), .out(x_n));

endmodule
