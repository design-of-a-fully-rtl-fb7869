// ffe: the feed-forward equalizer, an 8-tap programmable transposed FIR.
//
// Front end: ffe_shift_reg receives (address, coefficient) words serially
// on sdata/sdata_en/sclk and ffe_coef_ram stores them; all eight
// coefficients C0..C7 are presented in parallel. Back end: ffe_fir
// (Booth multipliers, carry-save accumulation per tap), ffe_vma (pipelined
// vector-merge adder) giving the 14-bit result r, and a pipeline register
// giving FE = r[13:6], the eight most significant bits.
// Timing: a sample taken at clock edge k is weighted by C0. It is in r
// after edge k+8, together with C1*x(k+1) .. C7*x(k+7), and in FE after
// edge k+9. That is ten register stages (eight taps, the merge adder's
// pipeline register, the FE register), the 10-clock latency from a sample
// at the pins to its FE word that the BEGIN block mirrors.
// Widths, tap count, latency and FE = top 8 bits of r follow the thesis.
module ffe
  import mdfe_pkg::*;
(
  input  logic          clk,
  input  logic          sclk,
  input  logic          reset,
  input  logic          sdata,
  input  logic          sdata_en,
  input  logic [XW-1:0] pdata,
  input  logic          pdata_ack,
  output logic [RW-1:0] r,
  output word_t         fe
);

  logic [2:0]    addr;
  logic [CW-1:0] coeff;
  logic          wr;
  coef_bank_t    c;
  logic [RW-1:0] d1, d2;

  ffe_shift_reg u_shift (.sclk, .reset, .sdata, .sdata_en, .addr, .coeff, .wr);
  ffe_coef_ram  u_ram   (.sclk, .reset, .wr, .addr, .coeff, .pdata_ack, .c);
  ffe_fir       u_fir   (.clk, .reset, .x(pdata), .c, .d1, .d2);
  ffe_vma       u_vma   (.clk, .reset, .d1, .d2, .r);

  // Pipeline delay: keep the eight most significant bits of r.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) fe <= '0;
    else       fe <= r[RW-1:RW-W];
  end

endmodule
