// rlncl_ks_adder: eight-bit, five-stage register-less NCL Kogge-Stone adder.
//
// Five power-gated logic blocks L1..L5 (ks_l1..ks_l5) are chained with no
// pipeline registers between them; each wavefront Ii is simply the output
// of L(i-1). Stage Si's rl_ctrl watches the critical output bit of Li with
// an OR gate (Ko(i)) and drives Sleep-bar(i) from a C-element of Ko-bar(i-1)
// and Ko(i+1): a block evaluates only after the previous NULL has reached
// I(i+2), and nullifies only after its DATA has reached I(i+2), so no token
// can overwrite the one ahead of it. Tokens occupy every other wavefront.
//
// Interface (four-phase, dual-rail): the sender presents DATA on a, b, cin
// while ko = 1 and NULL while ko = 0 (ko is Ko1, the completion of I2). The
// receiver reads sum/cout when they become DATA, then drops ki (Ko6) to 0;
// it raises ki again when they are NULL. Ko-bar(0) for S1 comes from a full
// completion detector on the 17 input bits, since the primary input has no
// known critical bit (this design's choice, as are rst and the ki port).
// rst puts every stage to sleep. sleep_n shows Sleep-bar of S1..S5 and
// ko_stage[k] shows Ko(k), k = 0..5 (Ko(0) = NOT Ko-bar(0)), for observation.
//
// The handshake loops run through latches (C-elements and held MTCMOS gate
// outputs): lint reports the combinational loops and latches; they are the
// asynchronous circuit itself. Timing: none; all delays are zero.
module rlncl_ks_adder
  import ncl_pkg::*;
(
  input  logic              rst,
  input  dr_t [WIDTH-1:0]   a,
  input  dr_t [WIDTH-1:0]   b,
  input  dr_t               cin,
  output logic              ko,
  output dr_t [WIDTH-1:0]   sum,
  output dr_t               cout,
  input  logic              ki,
  output logic [STAGES-1:0] sleep_n,
  output logic [STAGES:0]   ko_stage
);

  s1_t i2;
  s2_t i3;
  s3_t i4;
  s4_t i5;
  s5_t i6;

  // ko_v[k] = Ko(k), k = 1..STAGES, and ko_v[STAGES+1] = ki;
  // kobar_v[k] = Ko-bar(k), k = 0..STAGES-1 (Ko-bar(STAGES) has no reader)
  logic [STAGES+1:1] ko_v;
  logic [STAGES-1:0] kobar_v;
  dr_t  [STAGES:1]   crit;

  // Ko-bar(0): completion of the primary input I1
  ncl_cd #(.N(2 * WIDTH + 1)) u_cd_in (
    .rst  (rst),
    .d    ({cin, a, b}),
    .done (kobar_v[0])
  );
  assign ko_v[STAGES+1] = ki;

  ks_l1 u_l1 (.sleep_n(sleep_n[0]), .a(a), .b(b), .cin(cin), .o(i2));
  ks_l2 u_l2 (.sleep_n(sleep_n[1]), .i(i2), .o(i3));
  ks_l3 u_l3 (.sleep_n(sleep_n[2]), .i(i3), .o(i4));
  ks_l4 u_l4 (.sleep_n(sleep_n[3]), .i(i4), .o(i5));
  ks_l5 u_l5 (.sleep_n(sleep_n[4]), .i(i5), .o(i6));

  // critical output bit of each block
  assign crit[1] = i2.p[WIDTH-1];
  assign crit[2] = i3.gg[WIDTH-1];
  assign crit[3] = i4.gg[WIDTH-1];
  assign crit[4] = i5.c[WIDTH-1];
  assign crit[5] = i6.s[WIDTH-1];

  logic [STAGES:1] kobar_w;
  assign kobar_v[STAGES-1:1] = kobar_w[STAGES-1:1];

  for (genvar s = 1; s <= STAGES; s++) begin : g_ctrl
    rl_ctrl u_ctrl (
      .rst        (rst),
      .kobar_prev (kobar_v[s-1]),
      .ko_next    (ko_v[s+1]),
      .crit       (crit[s]),
      .sleep_n    (sleep_n[s-1]),
      .ko         (ko_v[s]),
      .kobar      (kobar_w[s])
    );
  end

  assign ko_stage = {ko_v[STAGES:1], ~kobar_v[0]};
  assign ko   = ko_v[1];
  assign sum  = i6.s;
  assign cout = i6.cout;

  // A dual-rail bit is never (1,1).
  always_comb begin
    for (int j = 0; j < WIDTH; j++)
      assert (!(i6.s[j].t && i6.s[j].f)) else $error("illegal dual-rail code on sum[%0d]", j);
  end

endmodule
