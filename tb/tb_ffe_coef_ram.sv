// tb_ffe_coef_ram: random writes to the 8 x 8 coefficient store, all
// eight words checked after each; writes while pdata_ack is high must be
// ignored; reset clears the store.
module tb_ffe_coef_ram
  import mdfe_pkg::*;
;
  logic sclk = 0, reset = 0, wr = 0, pdata_ack = 0;
  logic [2:0] addr = 0;
  logic [7:0] coeff = 0;
  coef_bank_t c;
  logic [7:0] m [8];
  int checks = 0, failures = 0, locked = 0;

  ffe_coef_ram dut (.sclk, .reset, .wr, .addr, .coeff, .pdata_ack, .c);

  always #5 sclk = ~sclk;

  initial begin
    repeat (3000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) m[i] = 0;
    #1 reset = 1;
    #1;
    for (int i = 0; i < 8; i++) begin checks++; if (c[i] !== 0) failures++; end
    #11 reset = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge sclk);
      wr = ($urandom % 2) == 1; addr = 3'($urandom); coeff = 8'($urandom);
      pdata_ack = ($urandom % 4) == 0;
      @(posedge sclk);
      if (wr && !pdata_ack) m[addr] = coeff;
      if (wr && pdata_ack) locked++;
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (c[i] !== m[i]) begin failures++; $display("n=%0d word %0d", n, i); end
      end
    end
    checks++; if (locked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
