// tb_ffe_shift_reg: sends random 11-bit (address, coefficient) words
// serially and checks address, coefficient and the one-cycle write strobe
// after sdata_en falls; no strobe may appear while shifting.
module tb_ffe_shift_reg;
  logic sclk = 0, reset = 1, sdata = 0, sdata_en = 0;
  logic [2:0] addr;
  logic [7:0] coeff;
  logic wr;
  int checks = 0, failures = 0;

  ffe_shift_reg dut (.sclk, .reset, .sdata, .sdata_en, .addr, .coeff, .wr);

  always #5 sclk = ~sclk;

  initial begin
    repeat (5000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] w;
    #12 reset = 0;
    for (int n = 0; n < 100; n++) begin
      w = 11'($urandom);
      for (int i = 10; i >= 0; i--) begin
        @(negedge sclk); sdata_en = 1; sdata = w[i];
        #1; checks++; if (wr) failures++;
      end
      @(negedge sclk); sdata_en = 0; sdata = 1'($urandom);
      #1;
      checks++;
      if (!wr || addr !== w[10:8] || coeff !== w[7:0]) begin
        failures++; $display("word %0d: %h %h wr=%b vs %h", n, addr, coeff, wr, w);
      end
      repeat ($urandom % 3 + 1) begin
        @(negedge sclk); #1; checks++; if (wr || {addr, coeff} !== w) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
