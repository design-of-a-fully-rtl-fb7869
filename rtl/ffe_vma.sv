// ffe_vma: the vector-merge adder of the FFE, a pipelined carry-ripple adder.
//
// It adds the sum and carry vectors d1, d2 of the FIR core into the
// two's-complement result r (W bits, modulo 2^W). The adder is split in
// two halves around one pipeline register: at a clock edge the low half
// is added and stored with its carry-out and with the unadded high
// halves; in the following cycle the high half is added, so r is valid
// one edge after d1/d2 and comes out combinationally from the register.
// The register is the pipeline delay in front of the merge adder in the
// thesis' FIR diagram. The half split is this design's choice; the thesis
// states only a pipelined carry-ripple adder. Async active-high reset.
module ffe_vma #(
  parameter int unsigned W = mdfe_pkg::RW
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2,
  output logic [W-1:0] r
);

  localparam int unsigned LO = W / 2;
  localparam int unsigned HI = W - LO;

  logic [LO-1:0] lo_sum;
  logic          lo_cy;
  logic [HI-1:0] hi_a, hi_b;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      {lo_cy, lo_sum} <= '0;
      hi_a            <= '0;
      hi_b            <= '0;
    end else begin
      {lo_cy, lo_sum} <= {1'b0, d1[LO-1:0]} + {1'b0, d2[LO-1:0]};
      hi_a            <= d1[W-1:LO];
      hi_b            <= d2[W-1:LO];
    end
  end

  assign r = {hi_a + hi_b + HI'(lo_cy), lo_sum};

endmodule
