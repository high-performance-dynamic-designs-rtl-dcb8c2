// mcc_odd_chain - Manchester chain of the odd new carries and carry out.
//
// The first node is pulled by the carry in c_{-1}; each following node is
// pulled by its new generate and linked to the previous node through the new
// propagate:
//   h_1 = G_1 + P_1 c_{-1},  h_3 = G_3 + P_3 h_1,
//   h_5 = G_5 + P_5 h_3,     h_7 = G_7 + P_7 h_5,
// and the module carry out is the conventional carry c_7 = t_7 h_7. The
// equations and chain structure are the document's; precharge is not
// modelled. Combinational.
module mcc_odd_chain (
  input  logic       cin,  // c_{-1}
  input  logic [3:0] gg,   // G_1, G_3, G_5, G_7
  input  logic [3:0] pp,   // P_1, P_3, P_5, P_7
  input  logic       t7,
  output logic [3:0] h,    // h_1, h_3, h_5, h_7
  output logic       cout  // c_7
);

  assign h[0] = gg[0] | (pp[0] & cin);

  for (genvar k = 1; k < 4; k++) begin : g_node
    assign h[k] = gg[k] | (pp[k] & h[k-1]);
  end

  assign cout = t7 & h[3];

endmodule
