// tb_ks_l1: self-checking test of logic block L1 (generate and propagate).
//
// Drives random operands, presented as the wavefront the block receives
// (worked out in ks_ref_pkg from integer arithmetic), and checks the
// 17 output bits against the reference for the next wavefront. Each trial
// walks one token through the block's life: asleep with NULL in (output
// NULL), DATA in while asleep (output stays NULL), woken (output DATA),
// input back to NULL while awake (output held), asleep again (NULL).
`timescale 1ns/1ps
module tb_ks_l1;
  import ncl_pkg::*;
  import ks_ref_pkg::*;

  localparam int NTRIAL = 300;

  logic sleep_n;
  dr_t [WIDTH-1:0] a, b;
  dr_t cin;
  s1_t o;

  int checks = 0, failures = 0;

  ks_l1 dut (.sleep_n(sleep_n), .a(a), .b(b), .cin(cin), .o(o));

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
    word_t va, vb;
    logic  vc;
    s1_t exp;
    sleep_n = 1'b0;
    a = '0; b = '0; cin = '0;
    #1;
    check(o === '0, "NULL output while asleep");
    for (int k = 0; k < NTRIAL; k++) begin
      va = word_t'($urandom); vb = word_t'($urandom); vc = 1'($urandom);
      if (k == 0) begin va = '1; vb = '0; vc = 1'b1; end
      if (k == 1) begin va = '1; vb = '1; vc = 1'b1; end
      exp = ref_s1(va, vb, vc);
      for (int j = 0; j < WIDTH; j++) begin a[j] = enc(va[j]); b[j] = enc(vb[j]); end
      cin = enc(vc);
      #1;
      check(o === '0, "asleep block ignores DATA at its input");
      sleep_n = 1'b1;
      #1;
      check(o === exp, $sformatf("a=%0h b=%0h cin=%0b: got %0h expected %0h", va, vb, vc, o, exp));
    a = '0; b = '0; cin = '0;
      #1;
      check(o === exp, "DATA held after the input returned to NULL");
      sleep_n = 1'b0;
      #1;
      check(o === '0, "NULL after sleep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
