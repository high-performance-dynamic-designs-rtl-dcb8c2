// mlp_pkg - shared definitions of the memory-less pipeline dynamic logic.
//
// Every gate level of the pipeline passes through three operating phases of
// equal length (one "phase time" each), always in the order precharge,
// evaluate, memory. Levels are split into three clock groups by L mod 3; the
// group of level L+1 runs one phase time behind the group of level L, so a
// level evaluates while its predecessor holds (memory) and precharges while
// its predecessor evaluates.
//
// The phase index counts phase times 0,1,2. In phase index 0 group 0
// (levels with L mod 3 = 1) precharges. The numbering of the phase index is
// a choice of this design; the phase order and the one-phase-time shift per
// level follow the clocking scheme of the pipeline.
package mlp_pkg;

  typedef enum logic [1:0] {
    PH_PRECHARGE = 2'd0,
    PH_EVALUATE  = 2'd1,
    PH_MEMORY    = 2'd2
  } op_phase_e;


  // Clock group (0, 1, 2) of gate level L (L >= 1): levels with L mod 3 = 1
  // use CLK1/CLK2, L mod 3 = 2 use CLK3/CLK4, L mod 3 = 0 use CLK5/CLK6.
  function automatic int unsigned level_group(input int unsigned level);
    return (level + 2) % 3;
  endfunction

  // Operating phase of a clock group during phase index ph.
  function automatic op_phase_e group_phase(input int unsigned grp,
                                            input logic [1:0] ph);
    int unsigned d;
    d = (int'(ph) + 3 - grp) % 3;
    case (d)
      0:       return PH_PRECHARGE;
      1:       return PH_EVALUATE;
      default: return PH_MEMORY;
    endcase
  endfunction

endpackage
