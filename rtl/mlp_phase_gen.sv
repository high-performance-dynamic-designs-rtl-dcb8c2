// mlp_phase_gen - three-phase clock generator of the memory-less pipeline.
//
// Produces the six clocks that drive the dynamic gate levels: the evaluate
// clocks CLK1, CLK3, CLK5 (active high, gate the nMOS evaluation transistors)
// and the precharge clocks CLK2, CLK4, CLK6 (active low, gate the pMOS
// precharge transistors). Pair k (CLK2k+1, CLK2k+2) drives clock group k;
// each pair is the previous one delayed by one phase time, i.e. one third of
// the clock period, so every group sees precharge, evaluate, memory in turn.
//
// Implementation: a base clock ticks once per phase time and a modulo-3
// counter selects the phase time; the six clocks are decoded from it and are
// active for a whole phase time (the narrower pulses of a real clock
// generator are not modelled). The pairing of the clocks and their
// phase relations follow the document; the generator itself is this
// design's own choice, the document giving only the waveforms.
//
// Timing: after reset the phase index is 0, in which CLK2 is low (group 0
// precharges) and CLK5 is high (group 2 evaluates). The outputs are decoded
// from a register and change right after each rising edge of clk.
module mlp_phase_gen
  import mlp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] clk_n,    // [0]=CLK1, [1]=CLK3, [2]=CLK5
  output logic [2:0] clk_p_n,  // [0]=CLK2, [1]=CLK4, [2]=CLK6
  output logic [1:0] phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            phase <= 2'd0;
    else if (phase == 2'd2) phase <= 2'd0;
    else                   phase <= phase + 2'd1;
  end

  always_comb begin
    for (int unsigned g = 0; g < 3; g++) begin
      clk_n[g]   = (group_phase(g, phase) == PH_EVALUATE);
      clk_p_n[g] = (group_phase(g, phase) != PH_PRECHARGE);
    end
  end

  // Never evaluate and precharge one group at once, and exactly one group
  // evaluates in every phase time.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (clk_n & ~clk_p_n) == 3'b000)
    else $error("mlp_phase_gen: a group evaluates and precharges at once");

  a_one_eval: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(clk_n))
    else $error("mlp_phase_gen: not exactly one evaluating group");

endmodule
