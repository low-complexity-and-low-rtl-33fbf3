// ks_l2: logic block L2 of the eight-bit register-less Kogge-Stone adder.
//
// First prefix level (span 1). Carry-in is the generate of position -1, so
// c[1] = G[0:-1] = g0 OR p0 AND cin is already a finished carry; for
// j = 1..7 it forms the group terms G[j:j-1] = g[j] OR p[j] AND g[j-1] and
// P[j:j-1] = p[j] AND p[j-1]. cin and p[7:0] pass through MTNCL buffers.
// Output: 24 dual-rail bits (s2_t). The stage's completion OR gate watches
// gg[7]. Each output rail is a held MTCMOS gate, which synthesis shows as
// a latch. Timing: none.
module ks_l2
  import ncl_pkg::*;
(
  input  logic sleep_n,
  input  s1_t  i,
  output s2_t  o
);

  dr_t             c1_set;
  dr_t [WIDTH-1:1] gg_set, pp_set;
  always_comb begin
    c1_set = dr_gen(i.g[0], i.p[0], i.cin);
    for (int j = 1; j < WIDTH; j++) begin
      gg_set[j] = dr_gen(i.g[j], i.p[j], i.g[j-1]);
      pp_set[j] = dr_and(i.p[j], i.p[j-1]);
    end
  end

  mt_gate #(.W(2 + 4 * (WIDTH - 1))) u_prefix (
    .sleep_n (sleep_n),
    .set     ({c1_set, gg_set, pp_set}),
    .z       ({o.c[1], o.gg, o.pp})
  );

  mtncl_buf #(.N(1 + WIDTH)) u_fwd (
    .sleep_n (sleep_n),
    .d       ({i.cin, i.p}),
    .q       ({o.c[0], o.p})
  );

endmodule
