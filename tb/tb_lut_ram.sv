// tb_lut_ram: writes random words into a 2^2 x 8 and a 2^3 x 8 table and
// checks the asynchronous read against a model, including reads while
// other writes happen and a write with the enable low.
module tb_lut_ram;
  logic sclk = 0;
  logic we2 = 0, we3 = 0;
  logic [1:0] addr2 = 0;
  logic [2:0] addr3 = 0;
  logic [7:0] din = 0, dout2, dout3;
  logic [7:0] m2 [4], m3 [8];
  int checks = 0, failures = 0;

  lut_ram #(.AW(2)) dut2 (.sclk, .we(we2), .addr(addr2), .din, .dout(dout2));
  lut_ram #(.AW(3)) dut3 (.sclk, .we(we3), .addr(addr3), .din, .dout(dout3));

  always #5 sclk = ~sclk;

  initial begin
    repeat (5000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input bit big, input int a, input logic [7:0] v);
    @(negedge sclk);
    din = v;
    if (big) begin addr3 = 3'(a); we3 = 1; end
    else     begin addr2 = 2'(a); we2 = 1; end
    @(posedge sclk); #1;
    we2 = 0; we3 = 0;
    if (big) m3[a] = v; else m2[a] = v;
  endtask

  initial begin
    for (int a = 0; a < 4; a++) wr(0, a, 8'($urandom));
    for (int a = 0; a < 8; a++) wr(1, a, 8'($urandom));
    for (int i = 0; i < 400; i++) begin
      if ($urandom % 3 == 0) wr($urandom % 2, $urandom % 8 % ((i % 2) ? 8 : 4), 8'($urandom));
      @(negedge sclk);
      addr2 = 2'($urandom); addr3 = 3'($urandom);
      din = 8'($urandom);   // enable low: must not write
      #1;
      checks += 2;
      if (dout2 !== m2[addr2]) begin failures++; $display("t2 %0d", addr2); end
      if (dout3 !== m3[addr3]) begin failures++; $display("t3 %0d", addr3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
