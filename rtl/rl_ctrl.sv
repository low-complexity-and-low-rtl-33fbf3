// rl_ctrl: control of one register-less NCL stage Si.
//
// Completion: the output bit on the critical path of logic block Li is the
// last to become DATA and the last to become NULL, so one OR gate on its two
// rails replaces a completion detector. kobar = OR(crit) is 1 when DATA is
// at the stage output I(i+1), and ko is its inverse (Ko(i)).
// Sleep: a C-element of Ko-bar(i-1) (DATA at Ii) and Ko(i+1) (NULL at
// I(i+2)) drives Sleep-bar(i). Li wakes when the next DATA is at its input
// and the previous NULL has reached I(i+2); it sleeps when NULL is at its
// input and its DATA has reached I(i+2). Using Ko(i+1) rather than Ko(i) is
// what lets the pipeline run without registers. rst forces sleep.
// In the full pipeline, sleep_n closes a loop through the next stages'
// logic and controls; lint reports it as circular logic. That loop is the
// asynchronous handshake itself and settles because every C-element and
// held gate output changes at most once per token. Timing: none.
module rl_ctrl
  import ncl_pkg::*;
(
  input  logic rst,
  input  logic kobar_prev,
  input  logic ko_next,
  input  dr_t  crit,
  output logic sleep_n,
  output logic ko,
  output logic kobar
);

  assign kobar = crit.t | crit.f;
  assign ko    = ~kobar;

  th_gate #(.M(2), .N(2)) u_celem (
    .rst (rst),
    .x   ({kobar_prev, ko_next}),
    .z   (sleep_n)
  );

endmodule
