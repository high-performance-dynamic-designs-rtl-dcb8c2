// tb_ks_sum_xor - builds the inverted half-sum and prefix-generate vectors of
// random operand pairs and checks that the sum unit returns a + b and the
// carry out.
module tb_ks_sum_xor;
  localparam int N = 16;
  logic [N-1:0] x_n, g_n, sum;
  logic cout;
  int checks = 0, failures = 0;

  ks_sum_xor #(.N(N), .INV(1'b1)) dut (.x_n, .g_n, .sum, .cout);

  initial begin
    logic [N-1:0] a, b;
    logic [N:0] ref_sum;
    logic c;
    for (int k = 0; k < 2000; k++) begin
      a = N'($urandom); b = N'($urandom);
      if (k == 0) begin a = '1; b = 1; end
      // prefix generate by a plain ripple
      c = 0;
      for (int i = 0; i < N; i++) begin
        c = (a[i] & b[i]) | ((a[i] | b[i]) & c);
        g_n[i] = ~c;
      end
      x_n = ~(a ^ b);
      #1;
      ref_sum = a + b;
      checks++;
      if ({cout, sum} !== ref_sum) begin
        failures++;
        $display("FAIL %h + %h = %h exp %h", a, b, {cout, sum}, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
