// ks_l3: logic block L3 of the eight-bit register-less Kogge-Stone adder.
//
// Second prefix level (span 2). Finishes the carries into bits 2 and 3:
// c[2] = G[1:-1] = G[1:0] OR P[1:0] AND cin, c[3] = G[2:-1] = G[2:1] OR
// P[2:1] AND c[1]; for j = 3..7 it forms G/P[j:j-3] from G/P[j:j-1] and
// G/P[j-2:j-3]. c[1:0] and p[7:0] pass through MTNCL buffers.
// Output: 22 dual-rail bits (s3_t). The completion OR gate watches gg[7].
// Each output rail is a held MTCMOS gate, which synthesis shows as a latch.
// Timing: none.
module ks_l3
  import ncl_pkg::*;
(
  input  logic sleep_n,
  input  s2_t  i,
  output s3_t  o
);

  dr_t [3:2]       c_set;
  dr_t [WIDTH-1:3] gg_set, pp_set;
  always_comb begin
    c_set[2] = dr_gen(i.gg[1], i.pp[1], i.c[0]);
    c_set[3] = dr_gen(i.gg[2], i.pp[2], i.c[1]);
    for (int j = 3; j < WIDTH; j++) begin
      gg_set[j] = dr_gen(i.gg[j], i.pp[j], i.gg[j-2]);
      pp_set[j] = dr_and(i.pp[j], i.pp[j-2]);
    end
  end

  mt_gate #(.W(4 + 4 * (WIDTH - 3))) u_prefix (
    .sleep_n (sleep_n),
    .set     ({c_set, gg_set, pp_set}),
    .z       ({o.c[3:2], o.gg, o.pp})
  );

  mtncl_buf #(.N(2 + WIDTH)) u_fwd (
    .sleep_n (sleep_n),
    .d       ({i.c, i.p}),
    .q       ({o.c[1:0], o.p})
  );

endmodule
