// tb_booth_mult: exhaustive check of the Booth multiplier. For all 64
// samples and all 256 coefficients the sum and carry outputs must add
// to the signed product modulo 2^14.
module tb_booth_mult
  import mdfe_pkg::*;
;
  logic [XW-1:0] x;
  logic [CW-1:0] h;
  logic [RW-1:0] s, c;
  logic [RW-1:0] exp_p;
  int checks = 0, failures = 0;

  booth_mult dut (.x, .h, .s, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -32; i < 32; i++) begin
      for (int j = -128; j < 128; j++) begin
        x = XW'(i); h = CW'(j);
        #1;
        exp_p = RW'(i * j);
        checks++;
        if (RW'(s + c) !== exp_p) begin
          failures++;
          if (failures < 10) $display("%0d * %0d: got %0d", i, j, RW'(s + c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
