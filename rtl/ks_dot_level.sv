// ks_dot_level - one prefix level (levels 2 to 5) of the pipelined
// Kogge-Stone adder.
//
// Position i combines its group (G_j, P_j) with the group of position i-D,
// (G_s, P_s), in a "dot" operation G = G_j + P_j G_s, P = P_j P_s. Because
// every dynamic gate inverts, the levels alternate in polarity:
//   INV_IN = 1 (levels 2 and 4) take ~G, ~P and use an OR-NAND gate
//     G = ~(~G_j (~P_j + ~G_s)) and a NOR gate P = ~(~P_j + ~P_s);
//   INV_IN = 0 (levels 3 and 5) take G, P and use an AND-NOR gate
//     ~G = ~(G_j + P_j G_s) and a NAND gate ~P = ~(P_j P_s).
// Positions i < D already hold their group down to bit 0; their generate
// passes through a dynamic NOT gate so that it stays in step with the
// pipeline, and their propagate, which no later level reads, is not
// computed (its node only precharges). NEED_P = 0 drops all propagate gates
// (last level). The half-sum bits x pass through one dynamic NOT gate per
// level. The gate equations are the document's; the treatment of the
// pass-through positions is this design's reading of it.
//
// Interface and timing: clk_n / clk_p_n are the clock pair of the level's
// group. Inputs must be stable during the evaluate phase time (the previous
// level is then in its memory phase); outputs are valid in the following
// phase time. Outputs have the opposite polarity of the inputs.
module ks_dot_level #(
  parameter int unsigned N      = 16,
  parameter int unsigned D      = 1,
  parameter bit          INV_IN = 1'b1,
  parameter bit          NEED_P = 1'b1
) (
  input  logic         clk,
  input  logic         clk_n,
  input  logic         clk_p_n,
  input  logic [N-1:0] g_in,
  input  logic [N-1:0] p_in,
  input  logic [N-1:0] x_in,
  output logic [N-1:0] g_out,
  output logic [N-1:0] p_out,
  output logic [N-1:0] x_out
);

  logic [N-1:0] pd_g, pd_p;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      if (i >= D) begin
        if (INV_IN) begin
          pd_g[i] = g_in[i] & (p_in[i] | g_in[i-D]);   // OR-NAND
          pd_p[i] = NEED_P & (p_in[i] | p_in[i-D]);    // NOR
        end else begin
          pd_g[i] = g_in[i] | (p_in[i] & g_in[i-D]);   // AND-NOR
          pd_p[i] = NEED_P & (p_in[i] & p_in[i-D]);    // NAND
        end
      end else begin
        pd_g[i] = g_in[i];                             // dynamic NOT
        pd_p[i] = 1'b0;                                // no gate
      end
    end
  end

  mlp_dyn_node #(.WIDTH(N)) u_g (
    .clk, .clk_n, .clk_p_n, .pd(pd_g), .out(g_out));

  mlp_dyn_node #(.WIDTH(N)) u_p (
    .clk, .clk_n, .clk_p_n, .pd(pd_p), .out(p_out));

  mlp_dyn_node #(.WIDTH(N)) u_x (
    .clk, .clk_n, .clk_p_n, .pd(x_in), .out(x_out));

endmodule
