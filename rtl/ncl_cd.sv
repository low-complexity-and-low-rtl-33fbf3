// ncl_cd: NCL completion detector for N dual-rail bits.
//
// One TH12 (OR) gate per bit tells whether that bit is DATA; a THnn gate
// (an N-input C-element) combines them, so done rises once every bit is
// DATA and falls once every bit is NULL, holding in between. This is the
// classic structure of n TH12 gates plus one THnn gate. In the adder it
// watches only the primary input. Timing: none.
module ncl_cd
  import ncl_pkg::*;
#(
  parameter int unsigned N = 17
) (
  input  logic        rst,
  input  dr_t [N-1:0] d,
  output logic        done
);

  logic [N-1:0] bit_data;
  for (genvar k = 0; k < N; k++) begin : g_th12
    assign bit_data[k] = d[k].t | d[k].f;
  end

  th_gate #(.M(N), .N(N)) u_thnn (
    .rst (rst),
    .x   (bit_data),
    .z   (done)
  );

endmodule
