// tb_lookup: stage 1 of the FBE. Loads all seven tables through the
// load-address path, then feeds random decisions and checks the 10-bit
// chain and every table output against a model addressed by the model's
// own decision history. Also rewrites table C during operation.
module tb_lookup
  import mdfe_pkg::*;
;
  logic clk = 0, reset_n = 0, ak = 0;
  lut_we_t we;
  logic [10:0] initial_data = 0;
  logic [9:0] q, mq;
  lut_word_t lut;
  logic [7:0] ma [4][4], mb [4], mc [8], md [8];
  int checks = 0, failures = 0;

  lookup dut (.clk, .reset_n, .sclk(clk), .ak, .we, .initial_data, .q, .lut);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int t, input int a, input logic [7:0] v);
    @(negedge clk);
    initial_data = {3'(a), v};
    we = '0;
    case (t)
      0: we.a1 = 1; 1: we.a2 = 1; 2: we.a3 = 1; 3: we.a4 = 1;
      4: we.b = 1;  5: we.c = 1;  default: we.d = 1;
    endcase
    @(posedge clk);
    mq = {mq[8:0], ak};   // the chain keeps running while a table is written
    #1;
    we = '0;
    if (t < 4) ma[t][a] = v; else if (t == 4) mb[a] = v;
    else if (t == 5) mc[a] = v; else md[a] = v;
  endtask

  task automatic check();
    checks++;
    if (q !== mq) begin failures++; $display("q %b vs %b", q, mq); end
    checks++;
    if (lut.a1 !== ma[0][mq[1:0]] || lut.a2 !== ma[1][mq[1:0]] || lut.a3 !== ma[2][mq[1:0]] ||
        lut.a4 !== ma[3][mq[1:0]] || lut.b !== mb[mq[3:2]] || lut.c !== mc[mq[6:4]] ||
        lut.d !== md[mq[9:7]]) begin
      failures++; $display("table outputs differ, q=%b", mq);
    end
  endtask

  initial begin
    we = '0; mq = '0;
    #7; checks++; if (q !== '0) failures++;   // reset seen at the first edge
    #5 reset_n = 1;
    for (int t = 0; t < 7; t++)
      for (int a = 0; a < ((t < 5) ? 4 : 8); a++) wr(t, a, 8'($urandom));
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      ak = 1'($urandom);
      @(posedge clk);
      mq = {mq[8:0], ak};
      #1;
      check();
      if (i == 300) for (int a = 0; a < 8; a++) wr(5, a, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
