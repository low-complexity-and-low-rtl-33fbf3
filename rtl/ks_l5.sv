// ks_l5: logic block L5 of the eight-bit register-less Kogge-Stone adder.
//
// Sum stage: s[j] = p[j] XOR c[j] and cout = G[7:0] OR P[7:0] AND cin, all
// with MTCMOS gates. Output: 9 dual-rail bits (s5_t), the adder result.
// The completion OR gate of this stage watches s[7]. Each output rail is a
// held MTCMOS gate, which synthesis shows as a latch. Timing: none.
module ks_l5
  import ncl_pkg::*;
(
  input  logic sleep_n,
  input  s4_t  i,
  output s5_t  o
);

  s5_t o_set;
  always_comb begin
    o_set.cout = dr_gen(i.g7, i.p7, i.c[0]);
    for (int j = 0; j < WIDTH; j++)
      o_set.s[j] = dr_xor(i.p[j], i.c[j]);
  end

  mt_gate #(.W($bits(s5_t))) u_sum (
    .sleep_n (sleep_n),
    .set     (o_set),
    .z       (o)
  );

endmodule
