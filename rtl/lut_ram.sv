// lut_ram: one small FBE look-up table (2^AW words of DW bits).
//
// The tables hold precomputed partial feedback values. They are written
// on the rising edge of sclk while `we` is high and read asynchronously:
// `dout` follows `addr` in the same cycle, so stage 1 of the FBE is the
// read of all seven tables. A single address port serves both uses; the
// caller muxes the load address in while writing. AW = 2 gives the
// 2^2 x 8 tables (A_1..A_4, B), AW = 3 the 2^3 x 8 ones (C, D). The
// contents are not reset; they must be loaded before use, as in the thesis.
module lut_ram #(
  parameter int unsigned AW = 2,
  parameter int unsigned DW = mdfe_pkg::W
) (
  input  logic          sclk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge sclk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
