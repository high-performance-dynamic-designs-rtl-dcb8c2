// tb_mcc_sum - checks the multiplexer sum of the double chain module: for
// random operands the testbench forms p, t and the new carries h_i from a
// ripple-carry reference (h_i = c_i when t_i = 1, otherwise either value is
// legal and both are tried), and requires the sum to equal a + b + c.
module tb_mcc_sum;
  logic [7:0] p, t, h, s;
  logic cin;
  int checks = 0, failures = 0;

  mcc_sum dut (.p, .t, .h, .cin, .s);

  initial begin
    logic [7:0] a, b, c;
    logic [8:0] ref_sum;
    logic cc;
    for (int k = 0; k < 4000; k++) begin
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      cc = cin;
      for (int i = 0; i < 8; i++) begin
        cc = (a[i] & b[i]) | ((a[i] | b[i]) & cc);
        c[i] = cc;
      end
      p = a ^ b; t = a | b;
      // where t_i = 0 the carry is 0 whatever h_i is: use random there
      h = (c & t) | (~t & 8'($urandom));
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + {8'b0, cin};
      checks++;
      if (s !== ref_sum[7:0]) begin
        failures++;
        $display("FAIL %h + %h + %b: s=%h exp %h", a, b, cin, s, ref_sum[7:0]);
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
