// mdfe_ref_pkg: reference models used by the testbenches.
//
// fb_ref computes the FBE feedback value straight from its definition:
// for decision a(n) the twelve previous decisions a(n-1)..a(n-12) pick one
// entry in each table and the entries are summed modulo 256. The two
// newest decisions choose among A_1..A_4 (a(n-2) is the thesis' a_k,
// a(n-1) its a_k+1). decide_ref is the slicer with overflow correction.
// ffe_ref is the FIR sum over a sample history. None of these model the
// pipeline; the testbenches compare the pipelined RTL against them.
package mdfe_ref_pkg;

  typedef struct {
    logic [7:0] a [4][4];   // [ {a_k, a_k+1} ][ address ]
    logic [7:0] b [4];
    logic [7:0] c [8];
    logic [7:0] d [8];
  } tables_t;

  // h[i] = a(n-i), i = 1..12
  function automatic logic [7:0] fb_ref(tables_t t, logic [12:1] h);
    logic [1:0] sel, aa, ab;
    logic [2:0] ac, ad;
    sel = {h[2], h[1]};
    aa  = {h[4], h[3]};
    ab  = {h[6], h[5]};
    ac  = {h[9], h[8], h[7]};
    ad  = {h[12], h[11], h[10]};
    return t.a[sel][aa] + t.b[ab] + t.c[ac] + t.d[ad];
  endfunction

  function automatic void decide_ref(input logic [7:0] fe, input logic [7:0] fb,
                                     input logic begin_i,
                                     output logic [7:0] sum, output logic pos,
                                     output logic neg, output logic a);
    int s;
    s   = int'($signed(fe)) + int'($signed(fb));
    sum = 8'(s);
    pos = s > 127;
    neg = s < -128;
    if (!begin_i)  a = fe[7];
    else if (pos)  a = 1'b0;
    else if (neg)  a = 1'b1;
    else           a = s < 0;
  endfunction

  // r = sum_j c[j] * x[j] (mod 2^14), x[j] the sample weighted by c[j]
  function automatic logic [13:0] ffe_ref(logic signed [7:0] c [8], logic signed [5:0] x [8]);
    int acc;
    acc = 0;
    for (int j = 0; j < 8; j++) acc += int'(c[j]) * int'(x[j]);
    return 14'(acc);
  endfunction

endpackage
