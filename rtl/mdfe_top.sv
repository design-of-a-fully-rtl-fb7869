// mdfe_top: the complete multi-level decision feedback equalizer chip.
//
// Samples pdata (6-bit signed) enter the FFE while pdata_ack is high; ten
// clocks later FE (8 bits) reaches the FBE together with Begin from the
// BEGIN block, and the FBE produces one decision bit ak per clock
// (1 = negative equalized sample). With `test` high the FBE takes
// `test_fe` instead of FE, so it can be exercised alone. Coefficients are
// loaded before operation: FFE words on sdata/sdata_en, FBE table words
// on ini with the seven table write enables, both clocked by sclk.
// All internal FBE signals of the full-port version of the chip are
// brought out. Pads are not part of this RTL. Connectivity follows the
// thesis' top level.
module mdfe_top
  import mdfe_pkg::*;
(
  input  logic            clk,
  input  logic            sclk,
  input  logic            reset,
  input  logic            reset_n,
  input  logic            sreset_n,
  input  logic            sdata,
  input  logic            sdata_en,
  input  logic [XW-1:0]   pdata,
  input  logic            pdata_ack,
  input  logic            ini,
  input  logic            we_a_1,
  input  logic            we_a_2,
  input  logic            we_a_3,
  input  logic            we_a_4,
  input  logic            we_b,
  input  logic            we_c,
  input  logic            we_d,
  input  logic            test,
  input  logic [W-1:0]    test_fe,
  output logic [W-1:0]    fe,
  output logic            fbe_begin,
  output logic [NDEC-1:0] q,
  output logic [W-1:0]    a_1,
  output logic [W-1:0]    a_2,
  output logic [W-1:0]    a_3,
  output logic [W-1:0]    a_4,
  output logic [W-1:0]    b,
  output logic [W-1:0]    c,
  output logic [W-1:0]    d,
  output logic [W-1:0]    sum_1,
  output logic [W-1:0]    sum_2,
  output logic [W-1:0]    fb,
  output logic [W-1:0]    sum,
  output logic            sum_7,
  output logic            over_pos,
  output logic            over_neg,
  output logic            ak
);

  word_t         fe_fbe;
  lut_word_t     lut;
  lut_we_t       we;
  logic [RW-1:0] r_unused;

  ffe u_ffe (.clk, .sclk, .reset, .sdata, .sdata_en, .pdata, .pdata_ack,
             .r(r_unused), .fe);

  mdfe_begin u_begin (.clk, .reset_n, .pdata_ack, .fbe_begin);

  assign fe_fbe = test ? test_fe : fe;
  assign we     = '{a1: we_a_1, a2: we_a_2, a3: we_a_3, a4: we_a_4,
                    b: we_b, c: we_c, d: we_d};

  fbe u_fbe (.clk, .reset_n, .sclk, .sreset_n, .fe(fe_fbe), .ini, .we,
             .fbe_begin, .q, .lut, .fb, .sum_1, .sum_2, .sum,
             .over_pos, .over_neg, .ak);

  assign a_1   = lut.a1;
  assign a_2   = lut.a2;
  assign a_3   = lut.a3;
  assign a_4   = lut.a4;
  assign b     = lut.b;
  assign c     = lut.c;
  assign d     = lut.d;
  assign sum_7 = sum[W-1];

endmodule
