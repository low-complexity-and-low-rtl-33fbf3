// mtncl_buf: N MTNCL buffers on N dual-rail signals.
//
// A pure wire cannot be put to sleep, so every input-to-output wire of a
// register-less logic block is replaced by a buffer: a TH12 MTCMOS gate with
// both inputs tied together, one per rail. While the block is awake the rail
// is copied (and held, see mt_gate); when it sleeps the output is NULL.
// Timing: none.
module mtncl_buf
  import ncl_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  logic          sleep_n,
  input  dr_t [N-1:0]   d,
  output dr_t [N-1:0]   q
);

  mt_gate #(.W(2 * N)) u_th12 (
    .sleep_n (sleep_n),
    .set     (d),
    .z       (q)
  );

endmodule
