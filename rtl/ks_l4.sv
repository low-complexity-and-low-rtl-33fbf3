// ks_l4: logic block L4 of the eight-bit register-less Kogge-Stone adder.
//
// Third prefix level (span 4). Finishes the carries into bits 4..7:
// c[j+1] = G[j:j-3] OR P[j:j-3] AND c[j-3] for j = 3..6, and forms the
// group G[7:0] = G[7:4] OR P[7:4] AND G[3:0] and P[7:0] = P[7:4] AND P[3:0]
// needed for the carry-out. c[3:0] and p[7:0] pass through MTNCL buffers.
// Output: 18 dual-rail bits (s4_t). The completion OR gate watches c[7].
// Each output rail is a held MTCMOS gate, which synthesis shows as a latch.
// Timing: none.
module ks_l4
  import ncl_pkg::*;
(
  input  logic sleep_n,
  input  s3_t  i,
  output s4_t  o
);

  dr_t [WIDTH-1:4] c_set;
  dr_t             g7_set, p7_set;
  always_comb begin
    for (int j = 3; j < WIDTH - 1; j++)
      c_set[j+1] = dr_gen(i.gg[j], i.pp[j], i.c[j-3]);
    g7_set = dr_gen(i.gg[7], i.pp[7], i.gg[3]);
    p7_set = dr_and(i.pp[7], i.pp[3]);
  end

  mt_gate #(.W(2 * (WIDTH - 4) + 4)) u_prefix (
    .sleep_n (sleep_n),
    .set     ({c_set, g7_set, p7_set}),
    .z       ({o.c[WIDTH-1:4], o.g7, o.p7})
  );

  mtncl_buf #(.N(4 + WIDTH)) u_fwd (
    .sleep_n (sleep_n),
    .d       ({i.c, i.p}),
    .q       ({o.c[3:0], o.p})
  );

endmodule
