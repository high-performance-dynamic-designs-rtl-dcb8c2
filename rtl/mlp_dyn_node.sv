// mlp_dyn_node - output nodes of one level of three-phase dynamic gates.
//
// Each bit stands for the output node of one dynamic gate driven by a pMOS
// precharge transistor (clock clk_p_n, active low) and an nMOS evaluation
// transistor (clock clk_n, active high) in series with the gate's nMOS
// network. The caller supplies "pd" (pull-down), which is 1 where the nMOS network
// conducts for the present inputs. In a phase time:
//   precharge (clk_p_n = 0): the node is charged high;
//   evaluate  (clk_n = 1):   the node is discharged where pd = 1;
//   memory    (both off):    the node keeps its charge, inputs are ignored.
// An evaluation can only discharge, never charge, as in the circuit; a node
// that missed its precharge therefore stays low. The gate output is the
// complement of the nMOS network function.
//
// The charge on a node is modelled as one storage bit updated at the end of
// each phase time (rising edge of clk, which ticks once per phase time);
// the circuit has no latch, the node capacitance holds the value. Both the
// basic gate and the enhanced gate with the evaluation transistor moved up
// behave the same at this level. The model is the document's; the one-bit
// per phase time abstraction is this design's.
module mlp_dyn_node #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             clk_n,
  input  logic             clk_p_n,
  input  logic [WIDTH-1:0] pd,          // 1 where the nMOS network conducts
  output logic [WIDTH-1:0] out
);

  always_ff @(posedge clk) begin
    if (!clk_p_n)   out <= '1;
    else if (clk_n) out <= out & ~pd;
  end

  always_ff @(posedge clk) begin
    assert (!(clk_n && !clk_p_n))
      else $error("mlp_dyn_node: evaluate and precharge clocks active together");
  end

endmodule
