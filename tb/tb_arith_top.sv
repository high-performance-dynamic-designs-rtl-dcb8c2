// tb_arith_top - end-to-end test of both adders at the top level, with every
// parameter at its default (64-bit Manchester adder).
//
// Kogge-Stone pipeline: a stream of operand pairs enters at every take, with
// noise on the operands in between; each result is checked against a + b
// with its latency (5 phase times) and take interval (3 phase times).
// Manchester adder: new random or corner-case operands every clock, result
// checked one clock later against a + b + cin.
// Counted mechanisms (each must occur): pipeline takes, several operand
// pairs in flight at once, operand changes outside the take phase time,
// Kogge-Stone carry out and full 16-bit carry propagation; Manchester
// carries crossing a module boundary, a carry rippling through all eight
// modules, even-chain and odd-chain carries, and carry out.
module tb_arith_top;
  localparam int W = 64;
  localparam int NKS = 300;
  localparam int NMCC = 3000;

  logic clk = 0, rst_n = 0;
  logic [15:0] ks_a, ks_b, ks_sum;
  logic ks_in_take, ks_cout, ks_sum_valid;
  logic [2:0] ks_clk_n, ks_clk_p_n;
  logic [W-1:0] mcc_a, mcc_b, mcc_sum;
  logic mcc_cin, mcc_cout;
  int checks = 0, failures = 0;

  arith_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // mechanism counters
  int n_take = 0, n_result = 0, n_overlap = 0, n_noise = 0, n_ks_cout = 0, n_ks_full = 0;
  int n_cross = 0, n_ripple_all = 0, n_even = 0, n_odd = 0, n_mcc_cout = 0, n_mcc = 0;

  // ---------------- Kogge-Stone stream ----------------
  int tick = 0, last_take = -1;
  logic [16:0] ks_q[$];
  int ks_t[$];

  always @(negedge clk) begin
    if (rst_n && ks_in_take && n_take < NKS) begin
      case (n_take)
        0: begin ks_a = 16'hffff; ks_b = 16'h0001; end
        1: begin ks_a = 16'hffff; ks_b = 16'hffff; end
        default: begin ks_a = 16'($urandom); ks_b = 16'($urandom); end
      endcase
    end else begin
      ks_a = 16'($urandom); ks_b = 16'($urandom);
      if (rst_n) n_noise++;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (ks_in_take && n_take < NKS) begin
        ks_q.push_back({1'b0, ks_a} + {1'b0, ks_b});
        ks_t.push_back(tick);
        if (ks_q.size() > 1) n_overlap++;
        if (last_take >= 0) check(tick - last_take == 3, "take interval");
        last_take = tick;
        n_take++;
      end
      if (ks_sum_valid && ks_q.size() > 0) begin
        logic [16:0] e;
        int t0;
        e = ks_q.pop_front();
        t0 = ks_t.pop_front();
        check({ks_cout, ks_sum} == e, $sformatf("ks sum %h exp %h", {ks_cout, ks_sum}, e));
        check(tick - t0 == 5, $sformatf("ks latency %0d", tick - t0));
        if (e[16]) n_ks_cout++;
        if (e[15:0] == 16'h0000 && e[16]) n_ks_full++;
        n_result++;
      end
      tick++;
    end
  end

  // ---------------- Manchester adder ----------------
  logic [W:0] mcc_exp, mcc_exp_d;
  logic mcc_pending = 0, mcc_pending_d = 0;

  function automatic logic [W-1:0] carries(input logic [W-1:0] x, input logic [W-1:0] y,
                                           input logic c);
    logic [W:0] r;
    r = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    return r[W-1:0] ^ x ^ y;     // carry into each bit
  endfunction

  always @(posedge clk) begin
    // the output shows what the register captured at the previous edge
    if (rst_n && mcc_pending_d) begin
      check({mcc_cout, mcc_sum} == mcc_exp_d,
            $sformatf("mcc sum %h exp %h", {mcc_cout, mcc_sum}, mcc_exp_d));
      n_mcc++;
    end
    mcc_exp_d = mcc_exp;
    mcc_pending_d = mcc_pending && rst_n;
  end

  always @(negedge clk) begin
    if (rst_n && n_mcc < NMCC) begin
      logic [W-1:0] cv;
      int k;
      k = n_mcc;
      case (k % 10)
        0: begin mcc_a = '1; mcc_b = '0; mcc_cin = 1'b1; end
        1: begin mcc_a = {$urandom, $urandom} | 64'h5555_5555_5555_5555;
                 mcc_b = ~mcc_a; mcc_cin = 1'($urandom); end
        default: begin mcc_a = {$urandom, $urandom}; mcc_b = {$urandom, $urandom};
                       mcc_cin = 1'($urandom); end
      endcase
      mcc_exp = {1'b0, mcc_a} + {1'b0, mcc_b} + {{W{1'b0}}, mcc_cin};
      cv = carries(mcc_a, mcc_b, mcc_cin);
      for (int m = 1; m < W / 8; m++) if (cv[8*m]) n_cross++;
      if (cv[W-1:1] == '1 && mcc_exp[W]) n_ripple_all++;
      for (int i = 0; i < W - 1; i++) begin
        if (cv[i+1] && (i % 2 == 0)) n_even++;
        if (cv[i+1] && (i % 2 == 1)) n_odd++;
      end
      if (mcc_exp[W]) n_mcc_cout++;
      mcc_pending = 1;
    end
  end

  initial begin
    ks_a = '0; ks_b = '0; mcc_a = '0; mcc_b = '0; mcc_cin = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (n_result == NKS && n_mcc >= NMCC);
    @(posedge clk);
    $display("ks: takes=%0d results=%0d in-flight-overlap=%0d noise=%0d cout=%0d full-carry=%0d",
             n_take, n_result, n_overlap, n_noise, n_ks_cout, n_ks_full);
    $display("mcc: adds=%0d module-crossings=%0d ripple-all=%0d even-carries=%0d odd-carries=%0d cout=%0d",
             n_mcc, n_cross, n_ripple_all, n_even, n_odd, n_mcc_cout);
    check(n_take > 0 && n_result == n_take, "ks takes and results");
    check(n_overlap > 0, "ks operand pairs in flight together");
    check(n_noise > 0, "ks operand changes outside take");
    check(n_ks_cout > 0, "ks carry out");
    check(n_ks_full > 0, "ks full 16-bit carry propagation");
    check(n_cross > 0, "mcc carry across module boundary");
    check(n_ripple_all > 0, "mcc carry through all modules");
    check(n_even > 0 && n_odd > 0, "mcc even and odd chain carries");
    check(n_mcc_cout > 0, "mcc carry out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NKS * 3 + NMCC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
