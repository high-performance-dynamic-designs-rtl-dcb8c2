// ks_mlp_adder16 - 16-bit Kogge-Stone adder whose carry look-ahead unit is a
// memory-less pipeline of three-phase dynamic gates.
//
// Main idea: every gate level is a pipeline stage with no latch. Each level
// goes precharge -> evaluate -> memory, one phase time each, and the clocks
// of level L+1 are those of level L delayed by one phase time. A level
// therefore evaluates while its predecessor holds its result in the memory
// phase, and a new operand pair can enter every three phase times while the
// older ones move down the levels like a wave.
//
// Structure (N = 16, log2 N = 4 prefix levels):
//   level 1     ks_gp_level  ~G, ~P, ~(A xor B)             CLK1/CLK2
//   level 2     ks_dot_level distance 1, inverted inputs     CLK3/CLK4
//   level 3     ks_dot_level distance 2, true inputs         CLK5/CLK6
//   level 4     ks_dot_level distance 4, inverted inputs     CLK1/CLK2
//   level 5     ks_dot_level distance 8, true inputs, no P   CLK3/CLK4
//   sum         ks_sum_xor   static XOR read in level 5's memory phase
// Level L uses clock group (L mod 3): CLK1/CLK2 for 1, CLK3/CLK4 for 2,
// CLK5/CLK6 for 0.
//
// Interface and timing (clk ticks once per phase time): a and b are taken at
// the end of each phase time in which in_take is high (level 1 evaluates),
// once every three phase times. The result of that pair is on sum/cout five
// phase times later, during the phase time in which sum_valid is high
// (level 5 in its memory phase). sum_valid stays low until the first operand
// pair taken after reset reaches the output. The level structure, gate
// equations and clocking are the document's; the carry-in of 0, the
// placement of the half-sum gates and the valid/take strobes are this
// design's. N other than 16 works for powers of two.
module ks_mlp_adder16
  import mlp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         in_take,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         sum_valid,
  output logic [2:0]   clk_n,     // CLK1, CLK3, CLK5
  output logic [2:0]   clk_p_n    // CLK2, CLK4, CLK6
);

  localparam int unsigned NLEV  = $clog2(N);      // prefix levels
  localparam int unsigned LAST  = NLEV + 1;       // last gate level
  localparam int unsigned LATE  = LAST + 1;       // phase times to first result
  localparam int unsigned GLAST = level_group(LAST);

  logic [1:0] phase;

  mlp_phase_gen u_clkgen (.clk, .rst_n, .clk_n, .clk_p_n, .phase);

  // lvl_*[L] are the output nodes of gate level L
  logic [N-1:0] lvl_g [1:LAST];
  logic [N-1:0] lvl_p [1:LAST];
  logic [N-1:0] lvl_x [1:LAST];

  ks_gp_level #(.N(N)) u_l1 (
    .clk,
    .clk_n  (clk_n[level_group(1)]),
    .clk_p_n(clk_p_n[level_group(1)]),
    .a, .b,
    .g_n(lvl_g[1]), .p_n(lvl_p[1]), .x_n(lvl_x[1]));

  for (genvar L = 2; L <= LAST; L++) begin : g_lvl
    ks_dot_level #(
      .N(N), .D(1 << (L - 2)), .INV_IN(L % 2 == 0), .NEED_P(L != LAST)
    ) u_dot (
      .clk,
      .clk_n  (clk_n[level_group(L)]),
      .clk_p_n(clk_p_n[level_group(L)]),
      .g_in(lvl_g[L-1]), .p_in(lvl_p[L-1]), .x_in(lvl_x[L-1]),
      .g_out(lvl_g[L]), .p_out(lvl_p[L]), .x_out(lvl_x[L]));
  end

  ks_sum_xor #(.N(N), .INV(LAST % 2 == 1)) u_sum (
    .x_n(lvl_x[LAST]), .g_n(lvl_g[LAST]), .sum, .cout);

  // Phase times since reset, saturating, to hide the unevaluated first wave.
  logic [3:0] warm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            warm <= '0;
    else if (warm != 4'hf) warm <= warm + 4'd1;
  end

  assign in_take   = clk_n[level_group(1)];
  assign sum_valid = (group_phase(GLAST, phase) == PH_MEMORY) &&
                     (int'(warm) >= LATE);

  // Pipeline rule: a level evaluates only while the level before it is in
  // its memory phase.
  for (genvar L = 2; L <= LAST; L++) begin : g_rule
    a_pred_holds: assert property (@(posedge clk) disable iff (!rst_n)
      clk_n[level_group(L)] |-> group_phase(level_group(L - 1), phase) == PH_MEMORY)
      else $error("ks_mlp_adder16: level %0d evaluates while level %0d is not holding", L, L - 1);
  end

endmodule
