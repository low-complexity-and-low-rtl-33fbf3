// mt_gate: W MTCMOS power-gated threshold gates sharing one Sleep-bar.
//
// Each gate has a set-to-1 function, evaluated by the logic block that uses
// it and applied on set[k]. With sleep_n = 0 the gate is power-gated and its
// output is pulled to 0 (NULL on that rail). With sleep_n = 1 the output
// rises as soon as set[k] is 1 and then stays 1 until the gate is put to
// sleep again. Keeping the 1 while awake is this design's choice: in the
// register-less pipeline a block's input returns to NULL before the block is
// put to sleep, and its DATA output must last until the next block has used
// it. The held 1 is a level-sensitive latch, reported by lint and intended.
// Leakage saving itself has no logic meaning and is not modelled.
// Timing: none; outputs follow in zero time.
module mt_gate #(
  parameter int unsigned W = 1
) (
  input  logic         sleep_n,
  input  logic [W-1:0] set,
  output logic [W-1:0] z
);

  for (genvar k = 0; k < W; k++) begin : g_gate
    always_latch begin
      if (!sleep_n)    z[k] = 1'b0;
      else if (set[k]) z[k] = 1'b1;
    end
  end

endmodule
