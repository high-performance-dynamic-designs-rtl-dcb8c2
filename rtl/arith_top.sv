// arith_top - the two adder designs side by side.
//
// 1. A 16-bit Kogge-Stone adder whose carry look-ahead unit is a memory-less
//    pipeline of three-phase dynamic gates (ks_mlp_adder16). clk is its
//    phase-time clock: operands are taken when ks_in_take is high (every
//    third clk), the sum appears five clk later while ks_sum_valid is high.
//    The six pipeline clocks are brought out.
// 2. A MCC_WIDTH-bit adder built from 8-bit double carry chain Manchester
//    modules (mcc_adder). It adds in one clock period; its result is
//    captured at each rising edge of clk, so mcc_sum/mcc_cout follow the
//    operands by one clock. This output register is this design's choice.
// The two designs share only clock and reset.
module arith_top #(
  parameter int unsigned MCC_WIDTH = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // memory-less pipeline Kogge-Stone adder
  input  logic [15:0]          ks_a,
  input  logic [15:0]          ks_b,
  output logic                 ks_in_take,
  output logic [15:0]          ks_sum,
  output logic                 ks_cout,
  output logic                 ks_sum_valid,
  output logic [2:0]           ks_clk_n,
  output logic [2:0]           ks_clk_p_n,
  // double carry chain Manchester adder
  input  logic [MCC_WIDTH-1:0] mcc_a,
  input  logic [MCC_WIDTH-1:0] mcc_b,
  input  logic                 mcc_cin,
  output logic [MCC_WIDTH-1:0] mcc_sum,
  output logic                 mcc_cout
);

  ks_mlp_adder16 #(.N(16)) u_ks (
    .clk, .rst_n,
    .a(ks_a), .b(ks_b),
    .in_take(ks_in_take),
    .sum(ks_sum), .cout(ks_cout), .sum_valid(ks_sum_valid),
    .clk_n(ks_clk_n), .clk_p_n(ks_clk_p_n));

  logic [MCC_WIDTH-1:0] mcc_s;
  logic                 mcc_c;

  mcc_adder #(.WIDTH(MCC_WIDTH)) u_mcc (
    .a(mcc_a), .b(mcc_b), .cin(mcc_cin), .s(mcc_s), .cout(mcc_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcc_sum  <= '0;
      mcc_cout <= 1'b0;
    end else begin
      mcc_sum  <= mcc_s;
      mcc_cout <= mcc_c;
    end
  end

endmodule
