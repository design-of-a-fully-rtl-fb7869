// tb_mdfe_top: the whole equalizer chip, end to end, at its only size.
//
// 1. Loads the eight FFE coefficients (sdata) and the seven FBE tables
//    (ini + write enables) through their serial ports.
// 2. Streams random samples in two blocks separated by an idle gap, and
//    checks every clock: FE against the FIR model, Begin against
//    pdata_ack ten clocks earlier, and ak/FB/SUM/overflow flags against
//    the decision recursion driven by the model FE.
// 3. Switches to test mode and drives the FBE from test_fe.
// 4. Tries an FFE coefficient write during valid data (must be ignored).
// Counts each mechanism: the four look-ahead selections, positive and
// negative overflow, Begin rising and falling, idle (Begin low) cycles,
// test-mode cycles and the locked write; a mechanism that never occurs
// is a failure.
module tb_mdfe_top
  import mdfe_pkg::*;
  import mdfe_ref_pkg::*;
;
  logic clk = 0, sclk = 0, reset = 0, reset_n = 0, sreset_n = 0;
  logic sdata = 0, sdata_en = 0, pdata_ack = 0, ini = 0, test = 0;
  logic we_a_1 = 0, we_a_2 = 0, we_a_3 = 0, we_a_4 = 0, we_b = 0, we_c = 0, we_d = 0;
  logic [5:0] pdata = 0;
  logic [7:0] test_fe = 0;
  logic [7:0] fe, a_1, a_2, a_3, a_4, b, c, d, sum_1, sum_2, fb, sum;
  logic [9:0] q;
  logic fbe_begin, sum_7, over_pos, over_neg, ak;

  mdfe_top dut (.*);

  always #5 clk = ~clk;
  always #5 sclk = ~sclk;

  // reference state
  tables_t t;
  logic signed [7:0] cc [8];
  logic signed [5:0] xs [$];
  logic signed [5:0] win [8];
  logic ackq [$];
  logic [12:1] hist;
  logic [13:0] er;
  word_t efe, efb, esum, fe_in;
  logic epos, eneg, ea, ebegin, prev_begin;
  int checks = 0, failures = 0;
  int sel_cnt [4], npos = 0, nneg = 0, nrise = 0, nfall = 0, nidle = 0, ntest = 0, nlock = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_ffe(input int a, input logic [7:0] v);
    logic [10:0] w;
    w = {3'(a), v};
    for (int i = 10; i >= 0; i--) begin
      @(negedge sclk); sdata_en = 1; sdata = w[i];
    end
    @(negedge sclk); sdata_en = 0;
    @(negedge sclk);
    if (!pdata_ack) cc[a] = v; else nlock++;
  endtask

  task automatic load_fbe(input int tbl, input int a, input logic [7:0] v);
    logic [10:0] w;
    w = {3'(a), v};
    for (int i = 10; i >= 0; i--) begin
      @(negedge sclk); ini = w[i];
    end
    @(negedge sclk);
    case (tbl)
      0: we_a_1 = 1; 1: we_a_2 = 1; 2: we_a_3 = 1; 3: we_a_4 = 1;
      4: we_b = 1;   5: we_c = 1;   default: we_d = 1;
    endcase
    @(negedge sclk);
    {we_a_1, we_a_2, we_a_3, we_a_4, we_b, we_c, we_d} = '0;
    if (tbl < 4) t.a[tbl][a] = v; else if (tbl == 4) t.b[a] = v;
    else if (tbl == 5) t.c[a] = v; else t.d[a] = v;
  endtask

  // One clock of operation with the model running alongside.
  task automatic step(input logic ack, input logic [5:0] x, input logic tst, input logic [7:0] tfe);
    @(negedge clk);
    pdata_ack = ack; pdata = x; test = tst; test_fe = tfe;
    #1;
    fe_in = test ? test_fe : efe;
    efb = fb_ref(t, hist);
    decide_ref(fe_in, efb, ebegin, esum, epos, eneg, ea);
    checks += 3;
    if (fe !== efe) begin failures++; $display("%0t fe %0d vs %0d", $time, fe, efe); end
    if (fbe_begin !== ebegin) begin failures++; $display("%0t begin %b", $time, fbe_begin); end
    if (ak !== ea) begin failures++; $display("%0t ak %b vs %b", $time, ak, ea); end
    if (ebegin) begin
      checks++;
      if (fb !== efb || sum !== esum || sum_7 !== esum[7] || over_pos !== epos || over_neg !== eneg) begin
        failures++; $display("%0t fb %0d/%0d sum %0d/%0d", $time, fb, efb, sum, esum);
      end
      sel_cnt[{hist[2], hist[1]}]++;
      npos += int'(epos); nneg += int'(eneg);
      if (test) ntest++;
    end else nidle++;
    if (ebegin && !prev_begin) nrise++;
    if (!ebegin && prev_begin) nfall++;
    prev_begin = ebegin;
    @(posedge clk);
    // advance the model by one clock
    hist = {hist[11:1], ea};
    efe = er[13:6];
    xs.push_back(x);
    void'(xs.pop_front());
    for (int j = 0; j < 8; j++) win[j] = xs[7 + j];   // x(n-8) .. x(n-1)
    er = ffe_ref(cc, win);
    ackq.push_back(ack);
    void'(ackq.pop_front());
    ebegin = ackq[0];
  endtask

  initial begin
    for (int i = 0; i < 4; i++) sel_cnt[i] = 0;
    for (int j = 0; j < 8; j++) cc[j] = 0;
    for (int i = 0; i < 16; i++) xs.push_back('0);
    for (int i = 0; i < 10; i++) ackq.push_back(1'b0);
    hist = '0; er = '0; efe = '0; ebegin = 0; prev_begin = 0;
    #1 reset = 1;
    #11 reset = 0; reset_n = 1; sreset_n = 1;
    // 1. initialisation through the serial ports (pdata idle, model idle)
    for (int j = 0; j < 8; j++) load_ffe(j, 8'($urandom));
    for (int k = 0; k < 7; k++)
      for (int a = 0; a < ((k < 5) ? 4 : 8); a++) load_fbe(k, a, 8'($urandom));
    repeat (12) step(0, 6'd0, 0, 8'd0);
    // 2. two blocks of valid samples with an idle gap between
    for (int i = 0; i < 600; i++) step(1, 6'($urandom), 0, 8'd0);
    repeat (30) step(0, 6'd0, 0, 8'd0);
    for (int i = 0; i < 300; i++) step(1, 6'($urandom), 0, 8'd0);
    repeat (30) step(0, 6'd0, 0, 8'd0);
    // 3. test mode: FBE driven from test_fe, Begin from pdata_ack
    for (int i = 0; i < 300; i++) step(1, 6'd0, 1, 8'($urandom));
    repeat (20) step(0, 6'd0, 0, 8'd0);
    // 4. coefficient write during valid data is ignored
    pdata_ack = 1;
    load_ffe(5, 8'h7f);
    pdata_ack = 0;
    // the clock ran during the load with pdata = 0 and ack = 1: re-sync the
    // model by idling long enough to flush every pipeline
    xs.delete(); ackq.delete();
    for (int i = 0; i < 16; i++) xs.push_back('0);
    for (int i = 0; i < 10; i++) ackq.push_back(1'b0);
    repeat (12) @(negedge clk);
    er = '0; efe = '0; ebegin = 0; prev_begin = 0;
    hist = {2'b00, q};   // resume from the decision chain
    for (int i = 0; i < 200; i++) step(1, 6'($urandom), 0, 8'd0);
    repeat (20) step(0, 6'd0, 0, 8'd0);

    for (int i = 0; i < 4; i++) begin checks++; if (sel_cnt[i] == 0) failures++; end
    checks += 7;
    if (npos == 0) failures++;
    if (nneg == 0) failures++;
    if (nrise < 2) failures++;
    if (nfall < 2) failures++;
    if (nidle == 0) failures++;
    if (ntest == 0) failures++;
    if (nlock == 0) failures++;
    $display("look-ahead %0d %0d %0d %0d, overflow +%0d -%0d, begin rise %0d fall %0d, idle %0d, test %0d, locked writes %0d",
             sel_cnt[0], sel_cnt[1], sel_cnt[2], sel_cnt[3], npos, nneg, nrise, nfall, nidle, ntest, nlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
