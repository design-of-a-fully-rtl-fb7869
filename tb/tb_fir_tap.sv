// tb_fir_tap: one FFE tap. With random sample, coefficient and incoming
// carry-save pair, the registered pair after the clock edge must add to
// in_s + in_c + x*h (mod 2^14); reset must clear it.
module tb_fir_tap
  import mdfe_pkg::*;
;
  logic clk = 0, reset = 0;
  logic [XW-1:0] x = 0;
  logic [CW-1:0] h = 0;
  logic [RW-1:0] in_s = 0, in_c = 0, q_s, q_c, e;
  int checks = 0, failures = 0;

  fir_tap dut (.clk, .reset, .x, .h, .in_s, .in_c, .q_s, .q_c);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset = 1;
    #1; checks++; if (q_s !== '0 || q_c !== '0) failures++;
    #11 reset = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      x = XW'($urandom); h = CW'($urandom); in_s = RW'($urandom); in_c = RW'($urandom);
      e = RW'(in_s + in_c + RW'(int'($signed(x)) * int'($signed(h))));
      @(posedge clk); #1;
      checks++;
      if (RW'(q_s + q_c) !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
