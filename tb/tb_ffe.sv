// tb_ffe: the whole feed-forward equalizer. Loads eight coefficients
// through the serial port, then
//  1. holds constant inputs long enough to fill the filter and checks r
//     and FE against the DC gain (the sum of the coefficients) -- with the
//     thesis' coefficient set 223, 80, 179, 186, 10, 127, 250, 98 (gain
//     129) this gives the r/FE pairs 1419/22, 13030/203, 3354/52, 129/2;
//  2. streams random samples and checks r (after edge n:
//     sum_j C_j x(n-8+j)) and FE (= r[13:6] one edge later) every cycle,
//     which also checks the 10-stage latency;
//  3. tries a coefficient write while pdata_ack is high (must be ignored)
//     and loads a second random set.
module tb_ffe
  import mdfe_pkg::*;
  import mdfe_ref_pkg::*;
;
  logic clk = 0, sclk = 0, reset = 0, sdata = 0, sdata_en = 0, pdata_ack = 0;
  logic [5:0] pdata = 0;
  logic [13:0] r, er;
  word_t fe, efe;
  logic signed [7:0] cc [8];
  logic signed [5:0] xs [$];
  logic signed [5:0] win [8];
  int checks = 0, failures = 0;

  ffe dut (.clk, .sclk, .reset, .sdata, .sdata_en, .pdata, .pdata_ack, .r, .fe);

  always #5 clk = ~clk;
  always #5 sclk = ~sclk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int a, input logic [7:0] v, input bit expect_write);
    logic [10:0] w;
    w = {3'(a), v};
    for (int i = 10; i >= 0; i--) begin
      @(negedge sclk); sdata_en = 1; sdata = w[i];
    end
    @(negedge sclk); sdata_en = 0;
    @(negedge sclk);
    if (expect_write) cc[a] = v;
  endtask

  // one clock with sample x; checks r and FE against the model after it
  task automatic step(input logic [5:0] x);
    @(negedge clk); pdata = x;
    @(posedge clk);
    xs.push_back(x);
    if (xs.size() > 16) void'(xs.pop_front());
    #1;
    if (xs.size() >= 10) begin
      efe = er[13:6];                       // r of the previous edge
      for (int j = 0; j < 8; j++) win[j] = xs[xs.size() - 9 + j];
      er = ffe_ref(cc, win);
      checks += 2;
      if (r !== er) begin failures++; $display("r %0d vs %0d", r, er); end
      if (fe !== efe) begin failures++; $display("fe %0d vs %0d", fe, efe); end
    end else begin
      for (int j = 0; j < 8; j++) win[j] = (xs.size() - 9 + j >= 0) ? xs[xs.size() - 9 + j] : '0;
      er = ffe_ref(cc, win);
    end
  endtask

  task automatic hold(input logic [5:0] x, input int er_v, input int fe_v);
    repeat (12) step(x);
    checks++;
    if (r !== 14'(er_v) || fe !== 8'(fe_v)) begin
      failures++; $display("constant %0d: r=%0d fe=%0d, want %0d %0d", x, r, fe, er_v, fe_v);
    end
  endtask

  initial begin
    int thesis [8] = '{223, 80, 179, 186, 10, 127, 250, 98};
    for (int j = 0; j < 8; j++) cc[j] = 0;
    #1 reset = 1;
    #11 reset = 0;
    for (int j = 0; j < 8; j++) load(j, 8'(thesis[j]), 1);
    pdata_ack = 1;
    hold(6'd11, 1419, 22);
    hold(6'd38, 13030, 203);
    hold(6'd26, 3354, 52);
    hold(6'd1, 129, 2);
    hold(6'd63, 16255, 253);
    for (int i = 0; i < 400; i++) step(6'($urandom));
    // write attempt during valid data: ignored
    load(3, 8'h55, 0);
    xs.delete();   // samples were not recorded while loading
    for (int i = 0; i < 50; i++) step(6'($urandom));
    pdata_ack = 0;
    for (int j = 0; j < 8; j++) load(j, 8'($urandom), 1);
    pdata_ack = 1;
    xs.delete();
    for (int i = 0; i < 400; i++) step(6'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
