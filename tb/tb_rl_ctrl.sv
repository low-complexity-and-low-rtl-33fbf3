// tb_rl_ctrl: self-checking test of the per-stage RL-NCL control.
//
// Random values of Ko-bar(i-1), Ko(i+1) and the critical output bit are
// applied. ko/kobar must be the NOR/OR of the critical bit's rails, and
// sleep_n must follow a C-element reference: 1 once both inputs are 1, 0
// once both are 0, unchanged otherwise. rst must force sleep.
`timescale 1ns/1ps
module tb_rl_ctrl;
  import ncl_pkg::*;

  logic rst, kobar_prev, ko_next, sleep_n, ko, kobar, e;
  dr_t  crit;
  int checks = 0, failures = 0;

  rl_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    rst = 1'b1; kobar_prev = 1'b1; ko_next = 1'b1; crit = DR_NULL;
    #1;
    check(sleep_n === 1'b0, "reset puts the stage to sleep");
    rst = 1'b0; kobar_prev = 1'b0; ko_next = 1'b0; e = 1'b0;
    #1;
    for (int k = 0; k < 2000; k++) begin
      kobar_prev = 1'($urandom);
      ko_next    = 1'($urandom);
      case ($urandom_range(0, 2))
        0: crit = DR_NULL;
        1: crit = dr_enc(1'b0);
        default: crit = dr_enc(1'b1);
      endcase
      if (kobar_prev && ko_next) e = 1'b1;
      else if (!kobar_prev && !ko_next) e = 1'b0;
      #1;
      check(sleep_n === e, $sformatf("sleep_n=%b expected %b", sleep_n, e));
      check(kobar === (crit.t | crit.f) && ko === !(crit.t | crit.f), "OR-gate completion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
