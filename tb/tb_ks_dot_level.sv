// tb_ks_dot_level - checks two prefix levels: distance 1 with inverted
// inputs (OR-NAND / NOR gates) and distance 4 with true inputs and no
// propagate outputs (AND-NOR gates, as the last level). Random group
// generate/propagate vectors are applied in the evaluate phase time and the
// outputs compared with the dot operation G = Gj + Pj Gs, P = Pj Ps worked
// out bit by bit, including the pass-through positions below the distance.
module tb_ks_dot_level;
  localparam int N = 16;
  logic clk = 0, clk_n = 0, clk_p_n = 1;
  logic [N-1:0] g1, p1, x1, go1, po1, xo1;
  logic [N-1:0] g2, p2, x2, go2, po2, xo2;
  int checks = 0, failures = 0;

  ks_dot_level #(.N(N), .D(1), .INV_IN(1'b1), .NEED_P(1'b1)) dut1 (
    .clk, .clk_n, .clk_p_n, .g_in(g1), .p_in(p1), .x_in(x1),
    .g_out(go1), .p_out(po1), .x_out(xo1));

  ks_dot_level #(.N(N), .D(4), .INV_IN(1'b0), .NEED_P(1'b0)) dut2 (
    .clk, .clk_n, .clk_p_n, .g_in(g2), .p_in(p2), .x_in(x2),
    .g_out(go2), .p_out(po2), .x_out(xo2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic phase_time(input logic n, input logic p_n_i);
    @(negedge clk); clk_n = n; clk_p_n = p_n_i;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [N-1:0] G, P, eg, ep;
    g1 = '0; p1 = '0; x1 = '0; g2 = '0; p2 = '0; x2 = '0;
    for (int k = 0; k < 300; k++) begin
      phase_time(0, 0);
      // generate and propagate are consistent: G implies P (inclusive P)
      G = N'($urandom); P = N'($urandom) | G;
      @(negedge clk);
      g1 = ~G; p1 = ~P; x1 = N'($urandom);
      g2 = G;  p2 = P;  x2 = N'($urandom);
      phase_time(1, 1);
      for (int i = 0; i < N; i++) begin
        // distance 1, true outputs
        eg[i] = (i >= 1) ? (G[i] | (P[i] & G[i-1])) : G[i];
        ep[i] = (i >= 1) ? (P[i] & P[i-1]) : 1'b1;
      end
      check(go1 == eg, $sformatf("D1 G %h exp %h", go1, eg));
      check(po1 == ep, $sformatf("D1 P %h exp %h", po1, ep));
      check(xo1 == ~x1, "D1 half-sum through NOT");
      for (int i = 0; i < N; i++)
        eg[i] = (i >= 4) ? !(G[i] | (P[i] & G[i-4])) : !G[i];
      check(go2 == eg, $sformatf("D4 ~G %h exp %h", go2, eg));
      check(po2 == '1, "D4 has no propagate gates");
      check(xo2 == ~x2, "D4 half-sum through NOT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
