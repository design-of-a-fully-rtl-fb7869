// tb_mdfe_system: the chip-level coordination run, at full size.
//
// It replays the system sequence that the equalizer was evaluated with:
// - a block of 16 valid samples (pdata_ack high for 16 clocks);
// - Begin rises exactly 10 clocks after pdata_ack;
// - FE carries filtered data from that clock on;
// - Begin falls 10 clocks after pdata_ack falls, and the FBE goes back to
//   idling on FE[7].
// The FFE is loaded with the coefficient set 223, 80, 179, 186, 10, 127,
// 250, 98 (8-bit two's complement) used in the FFE's own evaluation, and
// the first two samples are 11 and 38 as there; the rest are random. The
// FBE tables are random. Clock n is labelled with time 4080 + 10*n, so
// pdata_ack rises at 4080, Begin at 4180, pdata_ack falls at 4240 and
// Begin at 4340, as in the evaluation. The whole block is run three
// times. Every clock checks:
// - Begin against its required level at that time;
// - FE against an FIR model;
// - ak (and, while Begin is high, FB and SUM) against the decision
//   recursion.
// Each Begin edge and each FE/Begin state of the sequence must occur at
// the cycle the evaluation shows.
module tb_mdfe_system
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

  localparam int ACK_LEN = 16;              // 4080 .. 4230
  localparam int RUN_LEN = ACK_LEN + 24;    // to past 4340
  localparam logic [7:0] COEF [8] = '{8'd223, 8'd80, 8'd179, 8'd186,
                                      8'd10, 8'd127, 8'd250, 8'd98};

  tables_t t;
  logic signed [7:0] cc [8];
  logic signed [5:0] xs [$];
  logic signed [5:0] win [8];
  logic [12:1] hist;
  logic [13:0] er;
  word_t efe, efb, esum;
  logic epos, eneg, ea;
  int checks = 0, failures = 0;
  int rise_at, fall_at;

  initial begin
    repeat (20000) @(posedge clk);
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
    cc[a] = v;
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

  // One block as in the evaluation; clock n is time 4080 + 10*n.
  task automatic run_block();
    logic ebegin, prev;
    logic [5:0] x;
    prev = 0; rise_at = -1; fall_at = -1;
    for (int n = 0; n < RUN_LEN; n++) begin
      @(negedge clk);
      pdata_ack = (n < ACK_LEN);
      if (n == 0)            x = 6'd11;
      else if (n == 1)       x = 6'd38;
      else if (n < ACK_LEN)  x = 6'($urandom);
      else                   x = 6'd0;
      pdata = x;
      #1;
      ebegin = (n >= 10) && (n < ACK_LEN + 10);
      efb = fb_ref(t, hist);
      decide_ref(efe, efb, ebegin, esum, epos, eneg, ea);
      checks += 3;
      if (fbe_begin !== ebegin) begin
        failures++; $display("t=%0d Begin %b, expected %b", 4080 + 10 * n, fbe_begin, ebegin);
      end
      if (fe !== efe) begin
        failures++; $display("t=%0d FE %0d, expected %0d", 4080 + 10 * n, fe, efe);
      end
      if (ak !== ea) begin
        failures++; $display("t=%0d ak %b, expected %b", 4080 + 10 * n, ak, ea);
      end
      if (ebegin) begin
        checks++;
        if (fb !== efb || sum !== esum) begin
          failures++; $display("t=%0d FB %0d/%0d SUM %0d/%0d", 4080 + 10 * n, fb, efb, sum, esum);
        end
      end
      if (fbe_begin && !prev) rise_at = 4080 + 10 * n;
      if (!fbe_begin && prev) fall_at = 4080 + 10 * n;
      prev = fbe_begin;
      @(posedge clk);
      hist = {hist[11:1], ea};
      efe = er[13:6];
      xs.push_back(x);
      void'(xs.pop_front());
      for (int j = 0; j < 8; j++) win[j] = xs[j];   // x(n-8) .. x(n-1)
      er = ffe_ref(cc, win);
    end
    checks += 2;
    if (rise_at != 4180) begin failures++; $display("Begin rose at %0d", rise_at); end
    if (fall_at != 4340) begin failures++; $display("Begin fell at %0d", fall_at); end
  endtask

  initial begin
    for (int j = 0; j < 8; j++) cc[j] = 0;
    for (int i = 0; i < 9; i++) xs.push_back('0);
    hist = '0; er = '0; efe = '0;
    #1 reset = 1;
    #11 reset = 0; reset_n = 1; sreset_n = 1;
    for (int j = 0; j < 8; j++) load_ffe(j, COEF[j]);
    for (int k = 0; k < 7; k++)
      for (int a = 0; a < ((k < 5) ? 4 : 8); a++) load_fbe(k, a, 8'($urandom));
    // idle long enough to flush the FFE and fill the chain with zeros
    repeat (16) @(negedge clk);
    hist = {2'b00, q};
    for (int r = 0; r < 3; r++) begin
      run_block();
      $display("block %0d: pdata_ack 4080..%0d, Begin rose at %0d, fell at %0d",
               r, 4080 + 10 * (ACK_LEN - 1), rise_at, fall_at);
      repeat (16) @(negedge clk);
      hist = {2'b00, q};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
