// sft_11: serial-to-parallel converter that feeds the FBE look-up tables.
//
// The seven FBE tables are loaded before the equalizer runs. To save pins
// the 11-bit load word (table address in bits 10:8, data in bits 7:0) is
// shifted in one bit per sclk edge on `ini`. The register is a chain: each
// edge moves bit i to bit i+1 and takes `ini` into bit 0, so the first bit
// sent ends in bit 10 after 11 edges (send the word MSB first).
// sreset_n clears the chain asynchronously. The chain and its reset follow
// the thesis; the MSB-first order follows from that chain.
module sft_11 #(
  parameter int unsigned W = mdfe_pkg::INIT_W
) (
  input  logic         sclk,
  input  logic         sreset_n,
  input  logic         ini,
  output logic [W-1:0] initial_data
);

  always_ff @(posedge sclk or negedge sreset_n) begin
    if (!sreset_n) initial_data <= '0;
    else           initial_data <= {initial_data[W-2:0], ini};
  end

endmodule
