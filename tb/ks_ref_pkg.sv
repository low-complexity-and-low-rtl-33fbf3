// ks_ref_pkg: reference values for the Kogge-Stone adder testbenches.
//
// Every wavefront of the adder is worked out here from plain integer
// arithmetic on the operands, not from the prefix recurrences the design
// uses: a group generate G[hi:lo] is the carry out of adding bits lo..hi of
// a and b, G[hi:-1] the carry into bit hi+1 with cin added, and a group
// propagate P[hi:lo] is the AND of a XOR b over bits lo..hi.
package ks_ref_pkg;
  import ncl_pkg::*;

  typedef logic [WIDTH-1:0] word_t;

  function automatic dr_t enc(input logic v);
    return '{t: v, f: ~v};
  endfunction

  // carry out of bits lo..hi of a + b (no carry in)
  function automatic logic grp_g(input word_t a, b, input int hi, lo);
    int unsigned m = (1 << (hi - lo + 1)) - 1;
    int unsigned sa = (int'(a) >> lo) & m;
    int unsigned sb = (int'(b) >> lo) & m;
    return 1'((sa + sb) >> (hi - lo + 1));
  endfunction

  // AND of a XOR b over bits lo..hi
  function automatic logic grp_p(input word_t a, b, input int hi, lo);
    word_t x = a ^ b;
    logic r = 1'b1;
    for (int k = lo; k <= hi; k++) r &= x[k];
    return r;
  endfunction

  // carry into bit j of a + b + cin
  function automatic logic carry(input word_t a, b, input logic cin, input int j);
    int unsigned m = (1 << j) - 1;
    return 1'(((int'(a) & m) + (int'(b) & m) + int'(cin)) >> j);
  endfunction

  function automatic s1_t ref_s1(input word_t a, b, input logic cin);
    s1_t r;
    r.cin = enc(cin);
    for (int j = 0; j < WIDTH; j++) begin
      r.g[j] = enc(a[j] & b[j]);
      r.p[j] = enc(a[j] ^ b[j]);
    end
    return r;
  endfunction

  function automatic s2_t ref_s2(input word_t a, b, input logic cin);
    s2_t r;
    r.c[0] = enc(cin);
    r.c[1] = enc(carry(a, b, cin, 1));
    for (int j = 1; j < WIDTH; j++) begin
      r.gg[j] = enc(grp_g(a, b, j, j - 1));
      r.pp[j] = enc(grp_p(a, b, j, j - 1));
    end
    for (int j = 0; j < WIDTH; j++) r.p[j] = enc(a[j] ^ b[j]);
    return r;
  endfunction

  function automatic s3_t ref_s3(input word_t a, b, input logic cin);
    s3_t r;
    for (int j = 0; j < 4; j++) r.c[j] = enc(carry(a, b, cin, j));
    for (int j = 3; j < WIDTH; j++) begin
      r.gg[j] = enc(grp_g(a, b, j, j - 3));
      r.pp[j] = enc(grp_p(a, b, j, j - 3));
    end
    for (int j = 0; j < WIDTH; j++) r.p[j] = enc(a[j] ^ b[j]);
    return r;
  endfunction

  function automatic s4_t ref_s4(input word_t a, b, input logic cin);
    s4_t r;
    for (int j = 0; j < WIDTH; j++) r.c[j] = enc(carry(a, b, cin, j));
    r.g7 = enc(grp_g(a, b, WIDTH - 1, 0));
    r.p7 = enc(grp_p(a, b, WIDTH - 1, 0));
    for (int j = 0; j < WIDTH; j++) r.p[j] = enc(a[j] ^ b[j]);
    return r;
  endfunction

  function automatic s5_t ref_s5(input word_t a, b, input logic cin);
    s5_t r;
    int unsigned t = int'(a) + int'(b) + int'(cin);
    for (int j = 0; j < WIDTH; j++) r.s[j] = enc(t[j]);
    r.cout = enc(t[WIDTH]);
    return r;
  endfunction

endpackage
