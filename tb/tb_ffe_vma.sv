// tb_ffe_vma: the pipelined vector-merge adder. r must equal d1 + d2
// (mod 2^14) of the previous clock edge, for random operands including
// ones that carry from the low half into the high half.
module tb_ffe_vma;
  logic clk = 0, reset = 1;
  logic [13:0] d1 = 0, d2 = 0, r, e;
  int checks = 0, failures = 0, carries = 0;

  ffe_vma dut (.clk, .reset, .d1, .d2, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 reset = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d1 = 14'($urandom); d2 = 14'($urandom);
      e  = d1 + d2;
      if (8'(d1[6:0]) + 8'(d2[6:0]) > 127) carries++;
      @(posedge clk); #1;
      d1 = 14'($urandom); d2 = 14'($urandom);   // must not reach r yet
      #1;
      checks++;
      if (r !== e) begin failures++; $display("%0d: %0d vs %0d", i, r, e); end
    end
    checks++; if (carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
