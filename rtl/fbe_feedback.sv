// fbe_feedback: stage 3 of the FBE, the main adder and the slicer.
//
// PIPELINE_2 registers SUM_1 and SUM_2. In the next cycle the newest
// decision q0 (now a_k+1) selects FB = q0 ? SUM_2 : SUM_1, the main adder
// forms SUM = FE + FB (8 bits, wrapping) and the slicer decides:
//   over_pos = FE >= 0, FB >= 0 and SUM < 0  -> decision 0
//   over_neg = FE <  0, FB <  0 and SUM >= 0 -> decision 1
//   otherwise                                -> decision = SUM[7]
// so a decision of 1 means a negative equalized sample. While Begin is
// low the FBE is idle and the decision is simply FE[7]; with the FFE
// idle this fills the decision chain with zeros. The decision leaves
// combinationally in the same cycle and is registered by the chain in
// `lookup`. The selection, adder, overflow rule and Begin gating follow
// the thesis; the PIPELINE_2 registers have no reset, as there.
module fbe_feedback
  import mdfe_pkg::*;
(
  input  logic  clk,
  input  word_t fe,
  input  word_t sum_1,
  input  word_t sum_2,
  input  logic  fbe_begin,
  input  logic  q0,
  output word_t fb,
  output word_t sum,
  output logic  ak,
  output logic  over_pos,
  output logic  over_neg
);

  word_t fb_1, fb_2;   // PIPELINE_2
  logic  bk;

  always_ff @(posedge clk) begin
    fb_1 <= sum_1;
    fb_2 <= sum_2;
  end

  always_comb begin
    fb       = q0 ? fb_2 : fb_1;
    sum      = fe + fb;
    over_pos = !fe[W-1] && !fb[W-1] &&  sum[W-1];
    over_neg =  fe[W-1] &&  fb[W-1] && !sum[W-1];
    bk       = over_pos ? 1'b0 : (over_neg ? 1'b1 : sum[W-1]);
    ak       = fbe_begin ? bk : fe[W-1];
  end

  // Both overflow directions cannot occur together.
  assert property (@(posedge clk) !(over_pos && over_neg));

endmodule
