// lookup: stage 1 of the FBE (Structure IV).
//
// A 10-bit shift register keeps the past decisions: every clk edge the
// current decision `ak` enters q[0] and the rest move up, so during a
// cycle q[0] = a_k-1 ... q[9] = a_k-10. These bits address the seven
// tables at once:
//   A_1..A_4 : {q[1], q[0]}          = {a_k-2, a_k-1}
//   B        : {q[3], q[2]}          = {a_k-4, a_k-3}
//   C        : {q[6], q[5], q[4]}    = {a_k-7, a_k-6, a_k-5}
//   D        : {q[9], q[8], q[7]}    = {a_k-10, a_k-9, a_k-8}
// The four A tables hold the values for the four combinations of the two
// decisions still being made (a_k, a_k+1); later stages pick one.
// While a table's write enable is high its address comes from the serial
// loader instead (initial_data[9:8] or [10:8]) and initial_data[7:0] is
// written on sclk. Outputs are combinational (asynchronous table read).
// The chain has an asynchronous active-low reset, as in the thesis.
module lookup
  import mdfe_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic                  sclk,
  input  logic                  ak,
  input  lut_we_t               we,
  input  logic [INIT_W-1:0]     initial_data,
  output logic [NDEC-1:0]       q,
  output lut_word_t             lut
);

  logic [1:0] addr_a, addr_b;
  logic [2:0] addr_c, addr_d;
  logic       we_any_a;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) q <= '0;
    else          q <= {q[NDEC-2:0], ak};
  end

  assign we_any_a = we.a1 | we.a2 | we.a3 | we.a4;
  assign addr_a = we_any_a ? initial_data[9:8]  : q[1:0];
  assign addr_b = we.b     ? initial_data[9:8]  : q[3:2];
  assign addr_c = we.c     ? initial_data[10:8] : q[6:4];
  assign addr_d = we.d     ? initial_data[10:8] : q[9:7];

  lut_ram #(.AW(2)) u_a1 (.sclk, .we(we.a1), .addr(addr_a), .din(initial_data[7:0]), .dout(lut.a1));
  lut_ram #(.AW(2)) u_a2 (.sclk, .we(we.a2), .addr(addr_a), .din(initial_data[7:0]), .dout(lut.a2));
  lut_ram #(.AW(2)) u_a3 (.sclk, .we(we.a3), .addr(addr_a), .din(initial_data[7:0]), .dout(lut.a3));
  lut_ram #(.AW(2)) u_a4 (.sclk, .we(we.a4), .addr(addr_a), .din(initial_data[7:0]), .dout(lut.a4));
  lut_ram #(.AW(2)) u_b  (.sclk, .we(we.b),  .addr(addr_b), .din(initial_data[7:0]), .dout(lut.b));
  lut_ram #(.AW(3)) u_c  (.sclk, .we(we.c),  .addr(addr_c), .din(initial_data[7:0]), .dout(lut.c));
  lut_ram #(.AW(3)) u_d  (.sclk, .we(we.d),  .addr(addr_d), .din(initial_data[7:0]), .dout(lut.d));

endmodule
