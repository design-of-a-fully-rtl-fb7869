// booth_mult: radix-4 modified Booth multiplier with carry-save reduction.
//
// Computes x * h for a signed 6-bit sample x and a signed 8-bit coefficient
// h and returns the product as two vectors, s + c == x * h (mod 2^RW).
// h is the Booth-encoded operand: each overlapping bit triple
// (h[2j+1], h[2j], h[2j-1]), with h[-1] = 0, gives one digit in
// {-2,-1,0,1,2} as the signals one/two/neg. Each digit selects 0, x or
// 2x (sign-extended to RW bits); a negative digit inverts the selected
// value from bit 2j upward and adds a 1 at bit 2j through a correction
// row. The four partial products and the correction row are reduced by
// three carry-save adders to a sum and a carry vector; no carry-propagate
// adder is used. Combinational. Bit 0 of c is always 0 (a shifted carry
// vector).
// The Booth radix, the operand roles (coefficient encoded, sample
// selected) and the carry-save output follow the thesis. Plain sign
// extension instead of its modified two's-complement trick is this
// design's choice; results are identical.
module booth_mult
  import mdfe_pkg::*;
(
  input  logic [XW-1:0] x,
  input  logic [CW-1:0] h,
  output logic [RW-1:0] s,
  output logic [RW-1:0] c
);

  localparam int unsigned ND = CW / 2;   // Booth digits

  logic [CW:0]    hx;          // h with the implicit 0 below bit 0
  logic [RW-1:0]  xs;          // x sign-extended
  logic [RW-1:0]  pp [ND];     // partial products
  logic [RW-1:0]  corr;        // +1 for each negative digit
  logic [RW-1:0]  s1, c1, s2, c2;

  assign hx = {h, 1'b0};
  assign xs = RW'(signed'(x));

  always_comb begin
    corr = '0;
    for (int j = 0; j < ND; j++) begin
      logic one, two, neg;
      logic [RW-1:0] mag;
      one = hx[2*j+1] ^ hx[2*j];
      two = (hx[2*j+2] & ~hx[2*j+1] & ~hx[2*j]) | (~hx[2*j+2] & hx[2*j+1] & hx[2*j]);
      neg = hx[2*j+2];
      mag = one ? xs : (two ? (xs << 1) : '0);
      pp[j] = (neg ? ~mag : mag) << (2*j);
      corr[2*j] = neg;
    end
  end

  csa32 #(.W(RW)) u_csa0 (.a(pp[0]), .b(pp[1]), .c(pp[2]), .s(s1), .cy(c1));
  csa32 #(.W(RW)) u_csa1 (.a(pp[3]), .b(corr),  .c(s1),    .s(s2), .cy(c2));
  csa32 #(.W(RW)) u_csa2 (.a(s2),    .b(c2),    .c(c1),    .s(s),  .cy(c));

endmodule
