// tb_mcc_odd_chain - exhaustive check of the odd chain against the expanded
// equations h_1 = G_1 + P_1 c, h_3 = G_3 + P_3 G_1 + P_3 P_1 c, ...,
// h_7 = G_7 + P_7 G_5 + P_7 P_5 G_3 + P_7 P_5 P_3 G_1 + P_7 P_5 P_3 P_1 c,
// and of the carry out c_7 = t_7 h_7.
module tb_mcc_odd_chain;
  logic [3:0] gg, pp, h, e;
  logic cin, t7, cout;
  int checks = 0, failures = 0;

  mcc_odd_chain dut (.cin, .gg, .pp, .t7, .h, .cout);

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {t7, cin, pp, gg} = 10'(v); #1;
      e[0] = gg[0] | (pp[0] & cin);
      e[1] = gg[1] | (pp[1] & gg[0]) | (pp[1] & pp[0] & cin);
      e[2] = gg[2] | (pp[2] & gg[1]) | (pp[2] & pp[1] & gg[0]) | (pp[2] & pp[1] & pp[0] & cin);
      e[3] = gg[3] | (pp[3] & gg[2]) | (pp[3] & pp[2] & gg[1]) | (pp[3] & pp[2] & pp[1] & gg[0]) |
             (pp[3] & pp[2] & pp[1] & pp[0] & cin);
      checks++;
      if (h !== e) begin failures++; $display("FAIL v=%0d h=%b exp %b", v, h, e); end
      checks++;
      if (cout !== (t7 & e[3])) begin failures++; $display("FAIL v=%0d cout", v); end
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
