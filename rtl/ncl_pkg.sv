// ncl_pkg: types and helper functions shared by the register-less NCL adder.
//
// A dual-rail bit (dr_t) carries one logic value on two wires: (t,f) = (0,1)
// is DATA0, (1,0) is DATA1 and (0,0) is NULL, the spacer between two DATA
// wavefronts; (1,1) never occurs. The functions below are the "set-to-1"
// functions of NCL gates: positive (monotone) sums of products of rails, so
// a rail can only rise once its inputs are DATA. The struct types are the
// wavefronts between the five logic blocks of the eight-bit Kogge-Stone
// adder; their widths (17, 24, 22, 18 and 9 dual-rail bits) follow the stage
// widths of the reference design, carry-in being the generate of position -1.
package ncl_pkg;

  typedef struct packed {
    logic t;   // rail 1: DATA1
    logic f;   // rail 0: DATA0
  } dr_t;

  localparam int unsigned WIDTH  = 8;   // adder width
  localparam int unsigned STAGES = 5;   // logic blocks in the pipeline
  localparam dr_t DR_NULL = '{t: 1'b0, f: 1'b0};

  // I2: output of L1 (17 bits): carry-in, bit generate and bit propagate
  typedef struct packed {
    dr_t             cin;
    dr_t [WIDTH-1:0] g;
    dr_t [WIDTH-1:0] p;
  } s1_t;

  // I3: output of L2 (24 bits), prefix span 1
  //   c[0] = cin, c[1] = G[0:-1]; gg/pp[j] = G/P[j:j-1] for j = 1..7
  typedef struct packed {
    dr_t [1:0]       c;
    dr_t [WIDTH-1:1] gg;
    dr_t [WIDTH-1:1] pp;
    dr_t [WIDTH-1:0] p;
  } s2_t;

  // I4: output of L3 (22 bits), prefix span 2
  //   c[j] = carry into bit j for j = 0..3; gg/pp[j] = G/P[j:j-3] for j = 3..7
  typedef struct packed {
    dr_t [3:0]       c;
    dr_t [WIDTH-1:3] gg;
    dr_t [WIDTH-1:3] pp;
    dr_t [WIDTH-1:0] p;
  } s3_t;

  // I5: output of L4 (18 bits), prefix span 4
  //   c[j] = carry into bit j; g7/p7 = G/P[7:0]
  typedef struct packed {
    dr_t [WIDTH-1:0] c;
    dr_t             g7;
    dr_t             p7;
    dr_t [WIDTH-1:0] p;
  } s4_t;

  // I6: output of L5 (9 bits)
  typedef struct packed {
    dr_t             cout;
    dr_t [WIDTH-1:0] s;
  } s5_t;

  function automatic dr_t dr_enc(input logic v);
    return '{t: v, f: ~v};
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.t | d.f;
  endfunction

  // x AND y
  function automatic dr_t dr_and(input dr_t x, input dr_t y);
    return '{t: x.t & y.t, f: x.f | y.f};
  endfunction

  // x XOR y
  function automatic dr_t dr_xor(input dr_t x, input dr_t y);
    return '{t: (x.t & y.f) | (x.f & y.t), f: (x.t & y.t) | (x.f & y.f)};
  endfunction

  // g OR (p AND gin): the generate half of the prefix operator
  function automatic dr_t dr_gen(input dr_t g, input dr_t p, input dr_t gin);
    return '{t: g.t | (p.t & gin.t), f: g.f & (p.f | gin.f)};
  endfunction

endpackage
