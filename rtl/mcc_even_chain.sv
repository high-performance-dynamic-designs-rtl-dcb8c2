// mcc_even_chain - Manchester chain of the even new carries.
//
// Four chain nodes, each pulled down by its new generate and linked to the
// node before it through a pass transistor gated by the new propagate:
//   h_0 = G_0,  h_2 = G_2 + P_2 h_0,  h_4 = G_4 + P_4 h_2,
//   h_6 = G_6 + P_6 h_4.
// The chain is four devices long, like a 4-bit Manchester chain, but covers
// eight bits together with the odd chain. The equations and the chain
// structure are the document's; precharge of the domino nodes is not
// modelled (the outputs are the evaluated values). Combinational.
module mcc_even_chain (
  input  logic [3:0] gg,   // G_0, G_2, G_4, G_6
  input  logic [2:0] pp,   // P_2, P_4, P_6
  output logic [3:0] h     // h_0, h_2, h_4, h_6
);

  assign h[0] = gg[0];

  for (genvar k = 1; k < 4; k++) begin : g_node
    assign h[k] = gg[k] | (pp[k-1] & h[k-1]);
  end

endmodule
