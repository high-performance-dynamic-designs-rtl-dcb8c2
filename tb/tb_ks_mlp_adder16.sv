// tb_ks_mlp_adder16 - streams random and corner-case operand pairs through
// the pipelined Kogge-Stone adder, one pair every phase time in which the
// adder takes operands. Between takes the operands are replaced by random
// values, which the pipeline must ignore. Every result is compared with a + b
// and its arrival is checked against the expected timing: five phase times
// after the take, one new operand pair per three phase times.
module tb_ks_mlp_adder16;
  localparam int N = 16;
  localparam int LAT = 5;      // phase times from take to result
  localparam int II  = 3;      // phase times between takes
  localparam int NOPS = 400;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] a, b, sum;
  logic in_take, cout, sum_valid;
  logic [2:0] clk_n, clk_p_n;
  int checks = 0, failures = 0;

  ks_mlp_adder16 #(.N(N)) dut (.clk, .rst_n, .a, .b, .in_take, .sum, .cout,
                               .sum_valid, .clk_n, .clk_p_n);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int tick = 0;               // phase times since reset release
  int ntake = 0, nres = 0, last_take = -1;
  logic [N:0] exp_q[$];
  int take_t[$];

  function automatic logic [2*N-1:0] operands(input int k);
    case (k)
      0: return {16'hffff, 16'h0001};
      1: return {16'hffff, 16'hffff};
      2: return {16'h0000, 16'h0000};
      3: return {16'h8000, 16'h8000};
      4: return {16'h00ff, 16'h0001};
      5: return {16'h7fff, 16'h0001};
      6: return {16'haaaa, 16'h5555};
      7: return {16'haaaa, 16'h5556};
      default: return {N'($urandom), N'($urandom)};
    endcase
  endfunction

  // drive: stable operands during a take phase time, noise otherwise
  always @(negedge clk) begin
    if (rst_n && in_take && ntake < NOPS) begin
      {a, b} = operands(ntake);
    end else begin
      a = N'($urandom); b = N'($urandom);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_take && ntake < NOPS) begin
        exp_q.push_back({1'b0, a} + {1'b0, b});
        take_t.push_back(tick);
        if (last_take >= 0)
          check(tick - last_take == II, $sformatf("take interval %0d", tick - last_take));
        last_take = tick;
        ntake++;
      end
      if (sum_valid && exp_q.size() > 0) begin
        logic [N:0] e;
        int t0;
        e = exp_q.pop_front();
        t0 = take_t.pop_front();
        check({cout, sum} == e, $sformatf("sum %h exp %h", {cout, sum}, e));
        check(tick - t0 == LAT, $sformatf("latency %0d exp %0d", tick - t0, LAT));
        nres++;
      end
      tick++;
    end
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (nres == NOPS);
    @(posedge clk);
    check(exp_q.size() == 0, "all results returned");
    $display("takes=%0d results=%0d", ntake, nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * II + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
