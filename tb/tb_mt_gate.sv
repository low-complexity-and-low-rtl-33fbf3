// tb_mt_gate: self-checking test of the MTCMOS power-gated gates.
//
// Four gates share one Sleep-bar. Random set values and sleep changes are
// compared with a reference: asleep means 0; awake, an output becomes 1 when
// its set function is 1 and keeps that 1 until the gates sleep again.
`timescale 1ns/1ps
module tb_mt_gate;

  localparam int W = 4;
  logic         sleep_n;
  logic [W-1:0] set, z, e;
  int checks = 0, failures = 0;

  mt_gate #(.W(W)) dut (.sleep_n(sleep_n), .set(set), .z(z));

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
    sleep_n = 1'b0; set = '1; e = '0;
    #1;
    check(z === '0, "asleep output is 0 whatever set is");
    for (int k = 0; k < 2000; k++) begin
      sleep_n = ($urandom_range(0, 4) != 0);
      set = W'($urandom) & W'($urandom);
      e = sleep_n ? (e | set) : '0;
      #1;
      check(z === e, $sformatf("sleep_n=%b set=%b z=%b exp=%b", sleep_n, set, z, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
