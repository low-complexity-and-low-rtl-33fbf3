// tb_mtncl_buf: self-checking test of the MTNCL buffer.
//
// Three dual-rail signals go through the buffer. Awake, DATA is copied rail
// for rail and held when the input returns to NULL; asleep, the output is
// NULL even with DATA at the input.
`timescale 1ns/1ps
module tb_mtncl_buf;
  import ncl_pkg::*;

  localparam int N = 3;
  logic        sleep_n;
  dr_t [N-1:0] d, q;
  logic [N-1:0] v;
  int checks = 0, failures = 0;

  mtncl_buf #(.N(N)) dut (.sleep_n(sleep_n), .d(d), .q(q));

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
    sleep_n = 1'b0; d = '0;
    for (int k = 0; k < 500; k++) begin
      v = N'($urandom);
      for (int j = 0; j < N; j++) d[j] = dr_enc(v[j]);
      #1;
      check(q === '0, "asleep buffer outputs NULL");
      sleep_n = 1'b1;
      #1;
      for (int j = 0; j < N; j++)
        check(q[j] === dr_enc(v[j]), $sformatf("bit %0d copied", j));
      d = '0;
      #1;
      for (int j = 0; j < N; j++)
        check(q[j] === dr_enc(v[j]), $sformatf("bit %0d held", j));
      sleep_n = 1'b0;
      #1;
      check(q === '0, "NULL after sleep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
