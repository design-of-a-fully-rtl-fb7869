// tb_mdfe_begin: drives a random pdata_ack stream and checks that Begin is
// the same stream exactly 10 clocks later, and that reset clears it.
module tb_mdfe_begin;
  logic clk = 0, reset_n = 0, pdata_ack = 0, fbe_begin;
  logic hist [$];
  int checks = 0, failures = 0, rises = 0;

  mdfe_begin dut (.clk, .reset_n, .pdata_ack, .fbe_begin);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) hist.push_back(1'b0);
    #12 reset_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      // long bursts, as for blocks of samples
      if ($urandom % 12 == 0) pdata_ack = ~pdata_ack;
      @(posedge clk);
      hist.push_back(pdata_ack);
      void'(hist.pop_front());
      #1;
      checks++;
      if (fbe_begin !== hist[0]) begin failures++; $display("cycle %0d", i); end
      if (i > 0 && fbe_begin && !hist[0]) rises++;
    end
    reset_n = 0; #1;
    checks++; if (fbe_begin !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
