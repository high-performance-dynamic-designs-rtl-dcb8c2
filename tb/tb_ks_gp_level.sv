// tb_ks_gp_level - runs the first Kogge-Stone level through precharge,
// evaluate and memory phase times with random operands and checks the
// inverted generate, propagate and half-sum nodes, and that they hold while
// the operands change in the memory phase.
module tb_ks_gp_level;
  localparam int N = 16;
  logic clk = 0, clk_n = 0, clk_p_n = 1;
  logic [N-1:0] a, b, g_n, p_n, x_n;
  int checks = 0, failures = 0;

  ks_gp_level #(.N(N)) dut (.clk, .clk_n, .clk_p_n, .a, .b, .g_n, .p_n, .x_n);

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
    logic [N-1:0] ea, eb, eg, ep, ex;
    a = '0; b = '0;
    for (int k = 0; k < 200; k++) begin
      a = N'($urandom); b = N'($urandom);
      phase_time(0, 0);                     // precharge
      check(g_n == '1 && p_n == '1 && x_n == '1, "precharged");
      ea = N'($urandom); eb = N'($urandom);
      if (k == 0) begin ea = '1; eb = '1; end
      if (k == 1) begin ea = '0; eb = '0; end
      @(negedge clk); a = ea; b = eb;
      phase_time(1, 1);                     // evaluate
      for (int i = 0; i < N; i++) begin
        eg[i] = !(ea[i] && eb[i]);
        ep[i] = !(ea[i] || eb[i]);
        ex[i] = (ea[i] == eb[i]);
      end
      check(g_n == eg, $sformatf("g_n %h exp %h", g_n, eg));
      check(p_n == ep, $sformatf("p_n %h exp %h", p_n, ep));
      check(x_n == ex, $sformatf("x_n %h exp %h", x_n, ex));
      a = ~a; b = N'($urandom);
      phase_time(0, 1);                     // memory
      check(g_n == eg && p_n == ep && x_n == ex, "memory holds");
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
