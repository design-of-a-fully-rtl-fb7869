// tb_fbe: the whole feedback equalizer. Tables are loaded serially
// (11-bit words on `ini`, then one write-enable pulse). Then random FE
// words are fed with Begin mostly high; every cycle ak, FB, SUM and both
// overflow flags are compared with the reference recursion, which knows
// nothing of the pipeline: FB for a(n) is the table sum addressed by
// a(n-1)..a(n-12). Any pipeline timing error shows as a mismatch.
// Counts the four look-ahead selections, both overflows and Begin-low
// (idle) cycles, and fails if one never happened.
module tb_fbe
  import mdfe_pkg::*;
  import mdfe_ref_pkg::*;
;
  logic clk = 0, sclk = 0, reset_n = 0, sreset_n = 0, ini = 0, fbe_begin = 0;
  lut_we_t we;
  word_t fe = 0, fb, sum_1, sum_2, sum;
  logic [9:0] q;
  lut_word_t lut;
  logic over_pos, over_neg, ak;
  tables_t t;
  logic [12:1] hist;
  word_t efb, esum;
  logic epos, eneg, ea;
  int checks = 0, failures = 0;
  int sel_cnt [4], npos = 0, nneg = 0, nidle = 0;

  fbe dut (.clk, .reset_n, .sclk, .sreset_n, .fe, .ini, .we, .fbe_begin, .q, .lut,
           .fb, .sum_1, .sum_2, .sum, .over_pos, .over_neg, .ak);

  always #5 clk = ~clk;
  always #5 sclk = ~sclk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int tbl, input int a, input logic [7:0] v);
    logic [10:0] w;
    w = {3'(a), v};
    for (int i = 10; i >= 0; i--) begin
      @(negedge sclk); ini = w[i];
    end
    @(negedge sclk);
    case (tbl)
      0: we.a1 = 1; 1: we.a2 = 1; 2: we.a3 = 1; 3: we.a4 = 1;
      4: we.b = 1;  5: we.c = 1;  default: we.d = 1;
    endcase
    @(negedge sclk);
    we = '0;
    if (tbl < 4) t.a[tbl][a] = v; else if (tbl == 4) t.b[a] = v;
    else if (tbl == 5) t.c[a] = v; else t.d[a] = v;
  endtask

  initial begin
    we = '0; hist = '0;
    for (int i = 0; i < 4; i++) sel_cnt[i] = 0;
    #12 reset_n = 1; sreset_n = 1;
    for (int tb_i = 0; tb_i < 7; tb_i++)
      for (int a = 0; a < ((tb_i < 5) ? 4 : 8); a++) load(tb_i, a, 8'($urandom));
    repeat (3) @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      fe = 8'($urandom);
      fbe_begin = (n > 20) && (n % 500 > 10);   // idle stretches
      #1;
      efb = fb_ref(t, hist);
      decide_ref(fe, efb, fbe_begin, esum, epos, eneg, ea);
      checks++;
      if (ak !== ea) begin failures++; $display("n=%0d ak %b vs %b", n, ak, ea); end
      if (fbe_begin) begin
        checks++;
        if (fb !== efb || sum !== esum || over_pos !== epos || over_neg !== eneg) begin
          failures++; $display("n=%0d fb %0d/%0d sum %0d/%0d", n, fb, efb, sum, esum);
        end
        sel_cnt[{hist[2], hist[1]}]++;
        npos += int'(epos); nneg += int'(eneg);
      end else nidle++;
      checks++;
      if (q !== hist[10:1]) begin failures++; $display("n=%0d q %b vs %b", n, q, hist[10:1]); end
      @(posedge clk);
      hist = {hist[11:1], ea};
    end
    for (int i = 0; i < 4; i++) begin checks++; if (sel_cnt[i] == 0) failures++; end
    checks += 3;
    if (npos == 0) failures++;
    if (nneg == 0) failures++;
    if (nidle == 0) failures++;
    $display("look-ahead cases %0d %0d %0d %0d, overflows +%0d -%0d, idle %0d",
             sel_cnt[0], sel_cnt[1], sel_cnt[2], sel_cnt[3], npos, nneg, nidle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
