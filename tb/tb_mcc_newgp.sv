// tb_mcc_newgp - checks the new generate and propagate signals for random
// operands and carry-in: G_i = g_i + g_{i-1} (g_{-1} = carry in),
// P_i = p_i p_{i-1} t_{i-2} (t_{-1} = 1), computed here from the operand
// bits, and that G_i and P_i are never both 1.
module tb_mcc_newgp;
  logic [7:0] a, b, g, p, t, gg;
  logic [7:1] pp;
  logic cin;
  int checks = 0, failures = 0;

  assign g = a & b;
  assign p = a ^ b;
  assign t = a | b;

  mcc_newgp dut (.g, .p, .t, .cin, .gg, .pp);

  initial begin
    logic eg, ep, gm1, tm2;
    for (int k = 0; k < 3000; k++) begin
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        gm1 = (i == 0) ? cin : (a[i-1] & b[i-1]);
        eg  = (a[i] & b[i]) | gm1;
        checks++;
        if (gg[i] !== eg) begin failures++; $display("FAIL G%0d", i); end
        if (i >= 1) begin
          tm2 = (i == 1) ? 1'b1 : (a[i-2] | b[i-2]);
          ep  = (a[i] != b[i]) && (a[i-1] != b[i-1]) && tm2;
          checks++;
          if (pp[i] !== ep) begin failures++; $display("FAIL P%0d", i); end
          checks++;
          if (i >= 2 && gg[i] && pp[i]) begin failures++; $display("FAIL G%0d and P%0d both 1", i, i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
