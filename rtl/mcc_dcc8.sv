// mcc_dcc8 - 8-bit double carry chain Manchester adder module.
//
// The eight carries are split into two groups computed in parallel by two
// independent 4-long Manchester chains: one for the even new carries
// h_0, h_2, h_4, h_6 and one for the odd ones h_1, h_3, h_5, h_7 (the odd
// chain also gives the carry out c_7). This halves the chain length of an
// 8-bit carry chain at the cost of the extra gates that form the new
// generate and propagate signals. Data path:
//   a, b -> mcc_pgt (g, p, t) -> mcc_newgp (G, P)
//        -> mcc_even_chain | mcc_odd_chain (h) -> mcc_sum (s)
// Structure and equations are the document's. Combinational: in the
// circuit one domino evaluation.
module mcc_dcc8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);

  logic [7:0] g, p, t, gg, h;
  logic [7:1] pp;
  logic [3:0] h_even, h_odd;

  mcc_pgt #(.N(8)) u_pgt (.a, .b, .g, .p, .t);

  mcc_newgp u_newgp (.g, .p, .t, .cin, .gg, .pp);

  mcc_even_chain u_even (
    .gg({gg[6], gg[4], gg[2], gg[0]}),
    .pp({pp[6], pp[4], pp[2]}),
    .h (h_even));

  mcc_odd_chain u_odd (
    .cin,
    .gg({gg[7], gg[5], gg[3], gg[1]}),
    .pp({pp[7], pp[5], pp[3], pp[1]}),
    .t7(t[7]),
    .h (h_odd),
    .cout);

  always_comb
    for (int k = 0; k < 4; k++) begin
      h[2*k]   = h_even[k];
      h[2*k+1] = h_odd[k];
    end

  mcc_sum u_sum (.p, .t, .h, .cin, .s);

endmodule
