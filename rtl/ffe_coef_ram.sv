// ffe_coef_ram: the 8 x 8-bit register-based coefficient store of the FFE.
//
// Write port: at an sclk edge with `wr` high, word `addr` takes `coeff`.
// Read port: all eight words are always visible as c[0..7] and feed the
// eight Booth multipliers directly (no read clock). Writes are ignored
// while pdata_ack is high, so coefficients never change in the middle of
// a block of valid samples. Async active-high reset clears the store.
// The size and register-based dual-port organisation follow the thesis;
// the pdata_ack write lock and the reset are this design's reading of the
// pdata_ack connection drawn into the RAM.
module ffe_coef_ram
  import mdfe_pkg::*;
(
  input  logic          sclk,
  input  logic          reset,
  input  logic          wr,
  input  logic [2:0]    addr,
  input  logic [CW-1:0] coeff,
  input  logic          pdata_ack,
  output coef_bank_t    c
);

  coef_bank_t h;

  always_ff @(posedge sclk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < TAPS; i++) h[i] <= '0;
    end else if (wr && !pdata_ack) begin
      h[addr] <= coeff;
    end
  end

  assign c = h;

endmodule
