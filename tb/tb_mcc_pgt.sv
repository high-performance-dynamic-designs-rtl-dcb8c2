// tb_mcc_pgt - exhaustive check of the bit generate / propagate / transmit
// signals for all 8-bit operand pairs against the half-adder truth table.
module tb_mcc_pgt;
  logic [7:0] a, b, g, p, t;
  int checks = 0, failures = 0;

  mcc_pgt #(.N(8)) dut (.a, .b, .g, .p, .t);

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y += 7) begin
        a = 8'(x); b = 8'(y); #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          // truth table: (0,0)->g0 p0 t0, (0,1)/(1,0)->g0 p1 t1, (1,1)->g1 p0 t1
          case ({a[i], b[i]})
            2'b00: if ({g[i], p[i], t[i]} != 3'b000) failures++;
            2'b11: if ({g[i], p[i], t[i]} != 3'b101) failures++;
            default: if ({g[i], p[i], t[i]} != 3'b011) failures++;
          endcase
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
