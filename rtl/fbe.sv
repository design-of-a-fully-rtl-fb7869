// fbe: the look-ahead LUT feedback equalizer (Structure IV of the thesis).
//
// The feedback value for decision a_k+2 depends on the twelve previous
// decisions a_k+1 .. a_k-10. Instead of closing that loop in one cycle,
// the FBE starts three cycles early:
//   stage 1 (lookup)       the ten oldest decisions address seven tables;
//                          the A tables hold all four variants for the
//                          two decisions not yet known,
//   stage 2 (fbe_pipe)     a_k, known now, halves the variants: SUM_1/SUM_2,
//   stage 3 (fbe_feedback) a_k+1, known now, picks FB; FE + FB is sliced
//                          to a_k+2, which enters the decision chain.
// So only a 2-to-1 mux, one 8-bit adder and the slicer sit in the
// single-cycle loop. Tables are loaded serially: shift an 11-bit word
// MSB first into `ini` on sclk (sft_11), then raise the table's write
// enable for one sclk edge. The structure and the split into SFT_11,
// LOOKUP, PIPE and FEEDBACK follow the thesis.
module fbe
  import mdfe_pkg::*;
(
  input  logic            clk,
  input  logic            reset_n,
  input  logic            sclk,
  input  logic            sreset_n,
  input  word_t           fe,
  input  logic            ini,
  input  lut_we_t         we,
  input  logic            fbe_begin,
  output logic [NDEC-1:0] q,
  output lut_word_t       lut,
  output word_t           fb,
  output word_t           sum_1,
  output word_t           sum_2,
  output word_t           sum,
  output logic            over_pos,
  output logic            over_neg,
  output logic            ak
);

  logic [INIT_W-1:0] initial_data;

  sft_11 u_sft_11 (.sclk, .sreset_n, .ini, .initial_data);

  lookup u_lookup (.clk, .reset_n, .sclk, .ak, .we, .initial_data, .q, .lut);

  fbe_pipe u_pipe (.clk, .q0(q[0]), .lut, .sum_1, .sum_2);

  fbe_feedback u_feedback (.clk, .fe, .sum_1, .sum_2, .fbe_begin, .q0(q[0]),
                           .fb, .sum, .ak, .over_pos, .over_neg);

endmodule
