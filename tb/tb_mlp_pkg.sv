// tb_mlp_pkg - checks the clock-group and phase functions of mlp_pkg against
// the pipeline table: level L evaluates one phase time after level L-1, and
// every group runs precharge, evaluate, memory in that order.
module tb_mlp_pkg;
  import mlp_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // groups of levels 1..6: 0,1,2,0,1,2
    for (int unsigned L = 1; L <= 12; L++)
      check(level_group(L) == (L - 1) % 3, $sformatf("level_group(%0d)", L));
    // Table of phases: level L in cycle n (n from 0) of a pipeline that
    // starts with level 1 precharging: phase = (n - (L-1)) mod 3 -> p,e,m
    for (int unsigned L = 1; L <= 6; L++)
      for (int n = 0; n < 9; n++) begin
        op_phase_e exp;
        int d;
        d = ((n - int'(L) + 1) % 3 + 3) % 3;
        exp = (d == 0) ? PH_PRECHARGE : (d == 1) ? PH_EVALUATE : PH_MEMORY;
        check(group_phase(level_group(L), 2'(n % 3)) == exp,
              $sformatf("phase of level %0d at phase time %0d", L, n));
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
