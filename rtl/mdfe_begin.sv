// mdfe_begin: the BEGIN block, which tells the FBE when FFE data is valid.
//
// The FFE needs DELAY clocks from a sample at its input to the matching
// FE word. BEGIN delays pdata_ack by the same number of clocks through a
// chain of DELAY flip-flops with asynchronous active-low reset, so
// `fbe_begin` rises with the first valid FE and falls after the last one.
// Length 10 and the flip-flop chain follow the thesis.
module mdfe_begin #(
  parameter int unsigned DELAY = mdfe_pkg::BEGIN_DLY
) (
  input  logic clk,
  input  logic reset_n,
  input  logic pdata_ack,
  output logic fbe_begin
);

  logic [DELAY-1:0] chain;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) chain <= '0;
    else          chain <= {chain[DELAY-2:0], pdata_ack};
  end

  assign fbe_begin = chain[DELAY-1];

endmodule
