// tb_mlp_dyn_node - drives the precharge and evaluate clocks of a group of
// dynamic nodes directly and checks precharge to all ones, discharge where
// the pull-down conducts, hold in the memory phase whatever the inputs do,
// and that an evaluation without precharge cannot raise a node.
module tb_mlp_dyn_node;
  localparam int W = 8;
  logic clk = 0, clk_n = 0, clk_p_n = 1;
  logic [W-1:0] pd, out;
  int checks = 0, failures = 0;

  mlp_dyn_node #(.WIDTH(W)) dut (.clk, .clk_n, .clk_p_n, .pd, .out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // one phase time with the given clocks and pull-down pattern
  task automatic phase_time(input logic n, input logic p_n, input logic [W-1:0] v);
    @(negedge clk);
    clk_n = n; clk_p_n = p_n; pd = v;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [W-1:0] v, held;
    pd = '0;
    for (int k = 0; k < 50; k++) begin
      v = W'($urandom);
      phase_time(0, 0, W'($urandom));        // precharge, inputs ignored
      check(out == '1, "precharge to ones");
      phase_time(1, 1, v);                   // evaluate
      check(out == ~v, $sformatf("evaluate %h -> %h", v, out));
      held = out;
      phase_time(0, 1, W'($urandom));        // memory, inputs change
      check(out == held, "memory holds");
      phase_time(0, 1, '1);
      check(out == held, "memory holds against full pull-down");
    end
    // evaluation without precharge only discharges further
    phase_time(0, 0, '0);
    phase_time(1, 1, 8'h0f);
    phase_time(1, 1, 8'hf0);
    check(out == 8'h00, "no recharge during evaluate");
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
