// th_gate: NCL threshold gate THmn with hysteresis.
//
// The output rises when at least M of the N inputs are 1 and falls only when
// all N inputs are 0; in between it keeps its value. TH22 (M = N = 2) is the
// C-element, THnn the last gate of a completion detector. The hysteresis is
// the gate's own state, so it is written as a level-sensitive latch whose
// enable is "set or reset": the latch reported by lint is this state element
// and is intended. rst (an addition for a defined start state, as in the
// usual reset-to-NULL gate variant) forces the output to 0.
// Timing: none; the output follows its inputs in zero time.
module th_gate #(
  parameter int unsigned M = 2,
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] x,
  output logic         z
);

  logic set_c, clr_c;
  assign set_c = ($countones(x) >= M);
  assign clr_c = (x == '0);

  always_latch begin
    if (rst || clr_c)  z = 1'b0;
    else if (set_c)    z = 1'b1;
  end

  initial begin
    assert (M >= 1 && M <= N) else $error("th_gate: need 1 <= M <= N");
  end

endmodule
