// mcc_newgp - new generate and propagate signals of the double carry chain.
//
// The double chain rewrites the carries c_i = t_i h_i in terms of "new"
// carries h_i that depend only on every second position. It needs
//   G_i = g_i + g_{i-1}              (with g_{-1} = c_{-1}, the carry in)
//   P_i = p_i p_{i-1} t_{i-2}         (with t_{-1} = 1)
// so that h_i = G_i + P_i h_{i-2}. G_i and P_i are never both 1, which keeps
// the chain nodes free of false discharges. P_0 is not used by the chains
// (h_0 = G_0) and is not produced (it would need p_{-1}, which is not
// defined).
// The circuit builds them as domino gates; here they are combinational.
module mcc_newgp (
  input  logic [7:0] g,
  input  logic [7:0] p,
  input  logic [7:0] t,
  input  logic       cin,
  output logic [7:0] gg,
  output logic [7:1] pp
);

  always_comb begin
    gg[0] = g[0] | cin;
    gg[1] = g[1] | g[0];
    pp[1] = p[1] & p[0];
    for (int i = 2; i < 8; i++) begin
      gg[i] = g[i] | g[i-1];
      pp[i] = p[i] & p[i-1] & t[i-2];
    end
  end

endmodule
