// ffe_fir: the transposed-form FIR core of the FFE, in carry-save form.
//
// The sample x is broadcast to all TAPS taps. Tap 0 (the first tap, far
// from the output) starts from zero; tap j adds c[j]*x to what tap j-1
// stored one clock earlier. After the clock edge that stores tap j,
// its registers hold sum_{i<=j} c[i]*x(n-j+i), where x(n) is the sample
// taken at the newest edge. The last tap's sum and carry vectors are the
// outputs d1 and d2; a vector-merge adder (ffe_vma) adds them. Sample x(k),
// taken at edge k, is thus weighted by c[0] and is in d1/d2 after edge
// k+7, together with c[1]*x(k+1) .. c[7]*x(k+7).
// Structure (broadcast input, Booth multipliers, carry-save accumulation
// in every tap) follows the thesis. Bit 0 of d2 is always 0: it is a
// carry vector already shifted one place left.
module ffe_fir
  import mdfe_pkg::*;
(
  input  logic          clk,
  input  logic          reset,
  input  logic [XW-1:0] x,
  input  coef_bank_t    c,
  output logic [RW-1:0] d1,
  output logic [RW-1:0] d2
);

  logic [RW-1:0] s [TAPS+1];
  logic [RW-1:0] k [TAPS+1];

  assign s[0] = '0;
  assign k[0] = '0;

  for (genvar j = 0; j < TAPS; j++) begin : g_tap
    fir_tap u_tap (.clk, .reset, .x, .h(c[j]), .in_s(s[j]), .in_c(k[j]),
                   .q_s(s[j+1]), .q_c(k[j+1]));
  end

  assign d1 = s[TAPS];
  assign d2 = k[TAPS];

endmodule
