// tb_mcc_even_chain - exhaustive check of the even chain against the expanded
// sum-of-products equations h_2 = G_2 + P_2 G_0, h_4 = G_4 + P_4 G_2 +
// P_4 P_2 G_0, h_6 = G_6 + P_6 G_4 + P_6 P_4 G_2 + P_6 P_4 P_2 G_0.
module tb_mcc_even_chain;
  logic [3:0] gg, h, e;
  logic [2:0] pp;
  int checks = 0, failures = 0;

  mcc_even_chain dut (.gg, .pp, .h);

  initial begin
    for (int v = 0; v < 128; v++) begin
      {pp, gg} = 7'(v); #1;
      e[0] = gg[0];
      e[1] = gg[1] | (pp[0] & gg[0]);
      e[2] = gg[2] | (pp[1] & gg[1]) | (pp[1] & pp[0] & gg[0]);
      e[3] = gg[3] | (pp[2] & gg[2]) | (pp[2] & pp[1] & gg[1]) |
             (pp[2] & pp[1] & pp[0] & gg[0]);
      checks++;
      if (h !== e) begin failures++; $display("FAIL pp=%b gg=%b h=%b exp %b", pp, gg, h, e); end
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
