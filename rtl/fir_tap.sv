// fir_tap: one tap of the transposed-form FFE filter.
//
// The tap multiplies the broadcast sample x by its coefficient h
// (booth_mult, result in carry-save form) and adds the carry-save
// accumulation arriving from the previous tap with two carry-save adders
// (CSA1, CSA2). The result is stored in the tap's sum and carry registers
// q_s and q_c, which are the filter's tap delay: one clock per tap, no
// carry propagation. Asynchronous active-high reset clears both registers.
// Arithmetic is modulo 2^RW. Structure as in the thesis.
module fir_tap
  import mdfe_pkg::*;
(
  input  logic          clk,
  input  logic          reset,
  input  logic [XW-1:0] x,
  input  logic [CW-1:0] h,
  input  logic [RW-1:0] in_s,
  input  logic [RW-1:0] in_c,
  output logic [RW-1:0] q_s,
  output logic [RW-1:0] q_c
);

  logic [RW-1:0] ps, pc, s1, c1, s2, c2;

  booth_mult u_booth (.x, .h, .s(ps), .c(pc));

  csa32 #(.W(RW)) u_csa1 (.a(ps), .b(pc), .c(in_s), .s(s1), .cy(c1));
  csa32 #(.W(RW)) u_csa2 (.a(s1), .b(c1), .c(in_c), .s(s2), .cy(c2));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      q_s <= '0;
      q_c <= '0;
    end else begin
      q_s <= s2;
      q_c <= c2;
    end
  end

endmodule
