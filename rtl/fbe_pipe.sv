// fbe_pipe: stage 2 of the FBE (Structure IV).
//
// PIPELINE_1 registers the seven table outputs. In the next cycle the
// newest decision q0 (= a_k, made during the previous cycle) drives a
// 4-to-2 multiplexer: a_k = 0 keeps (A_1, A_2), a_k = 1 keeps (A_3, A_4).
// A separate adder forms B + C + D, and two adders give
//   SUM_1 = A_1/A_3 + B + C + D   (candidate for a_k+1 = 0)
//   SUM_2 = A_2/A_4 + B + C + D   (candidate for a_k+1 = 1)
// All sums are 8-bit two's complement and wrap modulo 256, as in the
// thesis' worked examples. sum_1/sum_2 are combinational from the
// PIPELINE_1 registers; the registers have no reset, as in the thesis.
module fbe_pipe
  import mdfe_pkg::*;
(
  input  logic      clk,
  input  logic      q0,
  input  lut_word_t lut,
  output word_t     sum_1,
  output word_t     sum_2
);

  lut_word_t p1;   // PIPELINE_1
  word_t     bcd, sel_lo, sel_hi;

  always_ff @(posedge clk) p1 <= lut;

  always_comb begin
    bcd    = p1.b + p1.c + p1.d;
    sel_lo = q0 ? p1.a3 : p1.a1;
    sel_hi = q0 ? p1.a4 : p1.a2;
    sum_1  = sel_lo + bcd;
    sum_2  = sel_hi + bcd;
  end

endmodule
