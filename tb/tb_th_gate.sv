// tb_th_gate: self-checking test of the THmn threshold gate.
//
// Three instances (TH22, the C-element; TH23; TH34) see random input
// patterns and are compared with a reference that keeps its own state: the
// output goes to 1 when at least M inputs are 1, to 0 when all are 0, and
// otherwise keeps its previous value. rst is checked to force 0.
`timescale 1ns/1ps
module tb_th_gate;

  logic       rst;
  logic [1:0] x22;
  logic [2:0] x23;
  logic [3:0] x34;
  logic       z22, z23, z34;
  logic       e22, e23, e34;
  int checks = 0, failures = 0;
  int rises = 0, holds = 0;

  th_gate                 u22 (.rst(rst), .x(x22), .z(z22));
  th_gate #(.M(2), .N(3)) u23 (.rst(rst), .x(x23), .z(z23));
  th_gate #(.M(3), .N(4)) u34 (.rst(rst), .x(x34), .z(z34));

  function automatic logic model(input logic prev, input int ones, input int m);
    if (ones >= m) return 1'b1;
    if (ones == 0) return 1'b0;
    return prev;
  endfunction

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
    rst = 1'b1; x22 = '1; x23 = '1; x34 = '1;
    #1;
    check(z22 === 1'b0 && z23 === 1'b0 && z34 === 1'b0, "reset forces 0");
    rst = 1'b0; x22 = '0; x23 = '0; x34 = '0;
    e22 = 1'b0; e23 = 1'b0; e34 = 1'b0;
    #1;
    for (int k = 0; k < 2000; k++) begin
      x22 = 2'($urandom); x23 = 3'($urandom); x34 = 4'($urandom);
      if ($urandom_range(0, 3) == 0) begin x22 = '0; x23 = '0; x34 = '0; end
      e22 = model(e22, $countones(x22), 2);
      e23 = model(e23, $countones(x23), 2);
      e34 = model(e34, $countones(x34), 3);
      if (e34 && $countones(x34) < 3) holds++;
      if (e22 && $countones(x22) == 2) rises++;
      #1;
      check(z22 === e22, $sformatf("TH22 x=%b z=%b exp=%b", x22, z22, e22));
      check(z23 === e23, $sformatf("TH23 x=%b z=%b exp=%b", x23, z23, e23));
      check(z34 === e34, $sformatf("TH34 x=%b z=%b exp=%b", x34, z34, e34));
    end
    check(rises > 0 && holds > 0, "both set and hold cases were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
