// tb_mcc_dcc8 - exhaustive check of the 8-bit double carry chain module:
// every operand pair and carry in, compared with a + b + cin.
module tb_mcc_dcc8;
  logic [7:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  mcc_dcc8 dut (.a, .b, .cin, .s, .cout);

  initial begin
    logic [8:0] r;
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v); #1;
      r = {1'b0, a} + {1'b0, b} + {8'b0, cin};
      checks++;
      if ({cout, s} !== r) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h + %b = %h exp %h", a, b, cin, {cout, s}, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
