// ffe_shift_reg: serial front end of the FFE coefficient store.
//
// An 11-bit shift-left register takes one bit of `sdata` per sclk edge
// while `sdata_en` is high (new bit into bit 0, so send MSB first). Bits
// 10:8 are the coefficient address, bits 7:0 the 8-bit coefficient. When
// `sdata_en` falls, `wr` is high for the one sclk edge that follows, and
// the coefficient RAM stores the word at that edge. So one coefficient is
// loaded by 11 enabled edges and one edge with sdata_en low.
// The 11-bit shift-left register is the thesis'; the write strobe on the
// falling enable is this design's choice (the thesis does not say when a
// word is written). Asynchronous active-high reset.
module ffe_shift_reg
  import mdfe_pkg::*;
(
  input  logic          sclk,
  input  logic          reset,
  input  logic          sdata,
  input  logic          sdata_en,
  output logic [2:0]    addr,
  output logic [CW-1:0] coeff,
  output logic          wr
);

  logic [INIT_W-1:0] sr;
  logic              en_q;

  always_ff @(posedge sclk or posedge reset) begin
    if (reset) begin
      sr   <= '0;
      en_q <= 1'b0;
    end else begin
      en_q <= sdata_en;
      if (sdata_en) sr <= {sr[INIT_W-2:0], sdata};
    end
  end

  assign addr  = sr[10:8];
  assign coeff = sr[7:0];
  assign wr    = en_q && !sdata_en;

endmodule
