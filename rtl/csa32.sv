// csa32: W-bit carry-save adder (a row of full adders, a 3:2 compressor).
//
// Reduces three vectors to a sum and a carry vector with
// a + b + c == s + cy (mod 2^W). The carry vector is already shifted one
// place left, so bit 0 of `cy` is always 0 and the top carry is dropped,
// which is exact for modulo-2^W arithmetic. Purely combinational.
module csa32 #(
  parameter int unsigned W = mdfe_pkg::RW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-2:0] maj;   // the top carry leaves the word

  assign s   = a ^ b ^ c;
  assign maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
  assign cy  = {maj, 1'b0};

endmodule
