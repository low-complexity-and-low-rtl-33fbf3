// ks_l1: logic block L1 of the eight-bit register-less Kogge-Stone adder.
//
// Makes the bit generate g[j] = a[j] AND b[j] and propagate
// p[j] = a[j] XOR b[j] for j = 0..7 with MTCMOS gates, and forwards the
// carry-in through an MTNCL buffer, since a plain wire could not be put to
// sleep. Output: 17 dual-rail bits (s1_t), NULL while sleep_n = 0.
// The split into five blocks follows the reference stage widths; the rail
// equations are this design's. The rl_ctrl of this stage watches p[7].
// Each output rail is a held MTCMOS gate, which synthesis shows as a latch.
// Timing: none.
module ks_l1
  import ncl_pkg::*;
(
  input  logic            sleep_n,
  input  dr_t [WIDTH-1:0] a,
  input  dr_t [WIDTH-1:0] b,
  input  dr_t             cin,
  output s1_t             o
);

  dr_t [WIDTH-1:0] g_set, p_set;
  always_comb begin
    for (int j = 0; j < WIDTH; j++) begin
      g_set[j] = dr_and(a[j], b[j]);
      p_set[j] = dr_xor(a[j], b[j]);
    end
  end

  mt_gate #(.W(4 * WIDTH)) u_gp (
    .sleep_n (sleep_n),
    .set     ({g_set, p_set}),
    .z       ({o.g, o.p})
  );

  mtncl_buf #(.N(1)) u_cin (
    .sleep_n (sleep_n),
    .d       (cin),
    .q       (o.cin)
  );

endmodule
