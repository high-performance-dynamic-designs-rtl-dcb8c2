// tb_mcc_adder - checks the 64-bit adder built from double carry chain
// modules with random operands and with carries that ripple through every
// module (all ones plus one, alternating patterns), against a + b + cin.
module tb_mcc_adder;
  localparam int W = 64;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  mcc_adder dut (.a, .b, .cin, .s, .cout);

  task automatic try(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] r;
    a = x; b = y; cin = c; #1;
    r = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    checks++;
    if ({cout, s} !== r) begin
      failures++;
      $display("FAIL %h + %h + %b = %h exp %h", x, y, c, {cout, s}, r);
    end
  endtask

  initial begin
    try('1, '0, 1'b1);
    try('1, 64'd1, 1'b0);
    try('1, '1, 1'b1);
    try('0, '0, 1'b0);
    try({32{2'b01}}, {32{2'b10}}, 1'b1);
    try(64'h00ff_00ff_00ff_00ff, 64'h0001_0001_0001_0001, 1'b0);
    try(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    for (int m = 0; m < 8; m++)
      try(~(64'hff << (8 * m)), 64'd1 << (8 * m), 1'b0);
    for (int k = 0; k < 5000; k++)
      try({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
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
