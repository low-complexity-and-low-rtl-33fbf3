// tb_rlncl_ks_adder: end-to-end test of the register-less NCL adder.
//
// A sender process offers NTOK random additions (a, b, cin) as dual-rail
// DATA/NULL wavefronts, obeying ko; a receiver process checks every result
// against a + b + cin computed here, with random delays before it
// acknowledges (ki), so tokens queue up inside the pipeline. A second phase
// stalls the receiver on one result and checks that exactly three DATA
// tokens fit in the five wavefronts (every other one), and that the held
// results come out intact. The testbench also counts the mechanisms of the
// pipeline: wake-ups and sleeps of each stage, Step 1 waits (DATA at the
// input while the block ahead is still busy) and Step 4 holds (input back at
// NULL while the block is still awake), and fails if any never happened;
// every wake-up and sleep is checked against the Step 2 and Step 5 rules.
// The design has its default sizes here. Time unit: 1 ns steps, no clock.
`timescale 1ns/1ps
module tb_rlncl_ks_adder;
  import ncl_pkg::*;

  localparam int NTOK = 400;

  logic              rst;
  dr_t [WIDTH-1:0]   a, b;
  dr_t               cin;
  logic              ko;
  dr_t [WIDTH-1:0]   sum;
  dr_t               cout;
  logic              ki;
  logic [STAGES-1:0] sleep_n;
  logic [STAGES:0]   ko_stage;

  rlncl_ks_adder dut (.*);

  int checks = 0, failures = 0;
  int unsigned expq[$];
  int received = 0;
  int rx_hold = 0;       // extra delay before the receiver acknowledges
  bit stall = 0;         // receiver holds off acknowledging

  int wakes[STAGES], sleeps[STAGES], waits1[STAGES], holds4[STAGES];

  function automatic logic all_data(dr_t [WIDTH-1:0] s, dr_t c);
    logic r = dr_is_data(c);
    for (int j = 0; j < WIDTH; j++) r &= dr_is_data(s[j]);
    return r;
  endfunction
  function automatic logic all_null(dr_t [WIDTH-1:0] s, dr_t c);
    logic r = !dr_is_data(c);
    for (int j = 0; j < WIDTH; j++) r &= !dr_is_data(s[j]);
    return r;
  endfunction

  logic out_data, out_null;
  always_comb begin
    out_data = all_data(sum, cout);
    out_null = all_null(sum, cout);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- sender ----------------
  int sent = 0;
  task automatic send_one(input logic [WIDTH-1:0] va, vb, input logic vc);
    wait (ko === 1'b1);
    #($urandom_range(0, 2));
    for (int j = 0; j < WIDTH; j++) begin
      a[j] = dr_enc(va[j]);
      b[j] = dr_enc(vb[j]);
    end
    cin = dr_enc(vc);
    expq.push_back(32'(va) + 32'(vb) + 32'(vc));
    sent++;
    wait (ko === 1'b0);
    #($urandom_range(0, 2));
    a = '0; b = '0; cin = DR_NULL;
  endtask

  // ---------------- receiver ----------------
  initial begin : receiver
    logic [WIDTH:0] got;
    int unsigned exp;
    ki = 1'b1;
    wait (rst === 1'b0);
    forever begin
      wait (out_data);
      for (int j = 0; j < WIDTH; j++) got[j] = sum[j].t;
      got[WIDTH] = cout.t;
      if (expq.size() == 0) begin
        check(0, "result with no token outstanding");
        exp = 0;
      end else exp = expq.pop_front();
      check(32'(got) == exp, $sformatf("result %0d, expected %0d", got, exp));
      received++;
      #($urandom_range(0, 3) + rx_hold);
      wait (!stall);
      ki = 1'b0;
      wait (out_null);
      #($urandom_range(0, 3));
      ki = 1'b1;
    end
  end

  // ---------------- mechanism counters ----------------
  // wake-ups and sleeps, on every change of the Sleep-bar port
  initial begin : edge_monitor
    logic [STAGES-1:0] sl_q;
    logic [STAGES+1:0] kv;
    sl_q = '0;
    forever begin
      @(sleep_n);
      kv = {ki, ko_stage};
      for (int s = 0; s < STAGES; s++) begin
        // Step 2: wake only with DATA at Ii (Ko(i-1) = 0) and NULL at
        // I(i+2) (Ko(i+1) = 1); Step 5: sleep only with the opposite
        if (sleep_n[s] && !sl_q[s]) begin
          wakes[s]++;
          check(!kv[s] && kv[s+2], $sformatf("S%0d woke out of turn", s + 1));
        end
        if (!sleep_n[s] && sl_q[s] && !rst) begin
          sleeps[s]++;
          check(kv[s] && !kv[s+2], $sformatf("S%0d slept out of turn", s + 1));
        end
      end
      sl_q = sleep_n;
    end
  end

  // Step 1 waits and Step 4 holds, sampled every half step (the handshake
  // delays of the sender and receiver make both states last that long)
  initial begin : state_monitor
    logic [STAGES-1:0] w_q, h_q, w_c, h_c;
    logic [STAGES+1:0] kov;   // Ko(0..6), Ko(6) being the receiver's ki
    w_q = '0; h_q = '0;
    forever begin
      #0.5;
      kov = {ki, ko_stage};
      for (int s = 0; s < STAGES; s++) begin
        // Step 1: DATA at Ii, block asleep because Ko(i+1) is still 0
        w_c[s] = !kov[s] && !kov[s+2] && !sleep_n[s];
        // Step 4: NULL back at Ii while the block is still awake
        h_c[s] = ko_stage[s] && sleep_n[s];
        if (w_c[s] && !w_q[s]) waits1[s]++;
        if (h_c[s] && !h_q[s]) holds4[s]++;
      end
      w_q = w_c; h_q = h_c;
    end
  end

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog expired, sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int n_before;
    rst = 1'b1; a = '0; b = '0; cin = DR_NULL;
    #5;
    check(sleep_n == '0 && ko == 1'b1 && all_null(sum, cout), "reset state");
    rst = 1'b0;
    #5;
    // corner operands first, then random traffic with a slow receiver
    send_one(8'hFF, 8'h00, 1'b1);
    send_one(8'hFF, 8'hFF, 1'b1);
    send_one(8'h00, 8'h00, 1'b0);
    send_one(8'h80, 8'h80, 1'b0);
    send_one(8'h55, 8'hAA, 1'b1);
    for (int k = 0; k < NTOK; k++) begin
      rx_hold = ($urandom_range(0, 3) == 0) ? $urandom_range(5, 30) : 0;
      send_one(8'($urandom), 8'($urandom), 1'($urandom));
    end
    rx_hold = 0;
    wait (received == sent && out_null && ki);
    #5;
    // capacity: stall the receiver and count accepted tokens
    stall = 1;
    n_before = sent;
    fork
      begin
        for (int k = 0; k < 10; k++) send_one(8'($urandom), 8'($urandom), 1'($urandom));
      end
      #500;
    join_any
    disable fork;
    check(sent - n_before == 3, $sformatf("tokens accepted while stalled: %0d, expected 3", sent - n_before));
    a = '0; b = '0; cin = DR_NULL;
    #5;
    stall = 0;
    wait (received == sent && out_null && ki);
    #5;
    check(ko == 1'b1 && all_null(sum, cout) && sleep_n == '0, "pipeline empty and asleep at the end");
    for (int s = 0; s < STAGES; s++) begin
      $display("stage S%0d: wakes=%0d sleeps=%0d step1_waits=%0d step4_holds=%0d",
               s + 1, wakes[s], sleeps[s], waits1[s], holds4[s]);
      check(wakes[s] == sent && sleeps[s] == sent, $sformatf("S%0d woke/slept once per token", s + 1));
      check(waits1[s] > 0, $sformatf("S%0d never waited for the block ahead (Step 1)", s + 1));
      check(holds4[s] > 0, $sformatf("S%0d never held DATA with NULL at its input (Step 4)", s + 1));
    end
    $display("tokens sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
