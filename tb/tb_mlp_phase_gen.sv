// tb_mlp_phase_gen - checks the six pipeline clocks cycle by cycle against
// the three-phase waveforms: CLK1 high / CLK2 low one phase time apart,
// CLK3/CLK4 and CLK5/CLK6 each one phase time later, period three phase
// times, and the reset state.
module tb_mlp_phase_gen;
  logic clk = 0, rst_n = 0;
  logic [2:0] clk_n, clk_p_n;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  mlp_phase_gen dut (.clk, .rst_n, .clk_n, .clk_p_n, .phase);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int t;
    logic [2:0] en, ep;
    int last_clk1;
    last_clk1 = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (t = 0; t < 60; t++) begin
      @(negedge clk);
      // independent expectation from the waveform table: at phase time t
      // CLK1 high if t%3==1, CLK3 if t%3==2, CLK5 if t%3==0;
      // CLK2 low if t%3==0, CLK4 if t%3==1, CLK6 if t%3==2
      en = 3'b000; ep = 3'b111;
      case (t % 3)
        0: begin en[2] = 1; ep[0] = 0; end
        1: begin en[0] = 1; ep[1] = 0; end
        default: begin en[1] = 1; ep[2] = 0; end
      endcase
      check(clk_n == en,   $sformatf("t=%0d clk_n=%b exp %b", t, clk_n, en));
      check(clk_p_n == ep, $sformatf("t=%0d clk_p_n=%b exp %b", t, clk_p_n, ep));
      check(phase == 2'(t % 3), $sformatf("t=%0d phase=%0d", t, phase));
      if (clk_n[0]) begin
        if (last_clk1 >= 0)
          check(t - last_clk1 == 3, $sformatf("CLK1 period %0d", t - last_clk1));
        last_clk1 = t;
      end
    end
    // reset in the middle returns to phase 0
    @(negedge clk); rst_n = 0; #1;
    check(phase == 0 && clk_p_n == 3'b110 && clk_n == 3'b100, "reset state");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
