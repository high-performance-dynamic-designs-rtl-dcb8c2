// tb_mcc_widths - the four adder sizes evaluated for the double carry chain
// design, 8, 16, 32 and 64 bits, built as 1, 2, 4 and 8 cascaded modules.
// Each size gets random operands plus a carry that ripples through all of
// its modules, checked against a + b + cin.
module tb_mcc_widths;
  int checks = 0, failures = 0;

  logic [63:0] a, b;
  logic cin;
  logic [7:0]  s8;  logic c8;
  logic [15:0] s16; logic c16;
  logic [31:0] s32; logic c32;
  logic [63:0] s64; logic c64;

  mcc_adder #(.WIDTH(8))  u8  (.a(a[7:0]),  .b(b[7:0]),  .cin, .s(s8),  .cout(c8));
  mcc_adder #(.WIDTH(16)) u16 (.a(a[15:0]), .b(b[15:0]), .cin, .s(s16), .cout(c16));
  mcc_adder #(.WIDTH(32)) u32 (.a(a[31:0]), .b(b[31:0]), .cin, .s(s32), .cout(c32));
  mcc_adder #(.WIDTH(64)) u64 (.a(a),       .b(b),       .cin, .s(s64), .cout(c64));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s a=%h b=%h cin=%b", what, a, b, cin); end
  endtask

  task automatic apply(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] r64; logic [32:0] r32; logic [16:0] r16; logic [8:0] r8;
    a = x; b = y; cin = c; #1;
    r8  = {1'b0, x[7:0]}  + {1'b0, y[7:0]}  + {8'b0, c};
    r16 = {1'b0, x[15:0]} + {1'b0, y[15:0]} + {16'b0, c};
    r32 = {1'b0, x[31:0]} + {1'b0, y[31:0]} + {32'b0, c};
    r64 = {1'b0, x}       + {1'b0, y}       + {64'b0, c};
    check({c8, s8}   == r8,  "8-bit");
    check({c16, s16} == r16, "16-bit");
    check({c32, s32} == r32, "32-bit");
    check({c64, s64} == r64, "64-bit");
  endtask

  initial begin
    apply('1, '0, 1'b1);           // carry through every module of every size
    apply('1, 64'd1, 1'b0);
    for (int k = 0; k < 4000; k++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
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
