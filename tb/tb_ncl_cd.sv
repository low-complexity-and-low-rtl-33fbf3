// tb_ncl_cd: self-checking test of the completion detector (17 bits).
//
// Each trial turns the bits of a NULL wavefront into DATA one at a time in
// random order: done must stay 0 until the last bit arrives, then be 1. The
// bits then return to NULL one at a time: done must stay 1 until the last
// one is NULL.
`timescale 1ns/1ps
module tb_ncl_cd;
  import ncl_pkg::*;

  localparam int N = 17;
  logic        rst;
  dr_t [N-1:0] d;
  logic        done;
  int checks = 0, failures = 0;
  int order[N];

  ncl_cd dut (.rst(rst), .d(d), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic shuffle();
    for (int j = 0; j < N; j++) order[j] = j;
    for (int j = N - 1; j > 0; j--) begin
      int r = $urandom_range(0, j);
      int t = order[j];
      order[j] = order[r];
      order[r] = t;
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
    rst = 1'b1; d = '0;
    #1;
    rst = 1'b0;
    #1;
    check(done === 1'b0, "NULL wavefront after reset");
    for (int k = 0; k < 100; k++) begin
      shuffle();
      for (int j = 0; j < N; j++) begin
        d[order[j]] = dr_enc(1'($urandom));
        #1;
        check(done === (j == N - 1), $sformatf("DATA on %0d of %0d bits: done=%b", j + 1, N, done));
      end
      shuffle();
      for (int j = 0; j < N; j++) begin
        d[order[j]] = DR_NULL;
        #1;
        check(done === (j != N - 1), $sformatf("NULL on %0d of %0d bits: done=%b", j + 1, N, done));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
