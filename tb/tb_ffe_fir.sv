// tb_ffe_fir: the transposed FIR core. Random coefficients and samples;
// after the edge that takes sample x(n), d1 + d2 must be
// sum_j c[j] * x(n-7+j) (mod 2^14). Samples before the first are zero
// (the taps are reset).
module tb_ffe_fir
  import mdfe_pkg::*;
  import mdfe_ref_pkg::*;
;
  logic clk = 0, reset = 1;
  logic [XW-1:0] x = 0;
  coef_bank_t c;
  logic [RW-1:0] d1, d2, e;
  logic signed [5:0] hist [8];
  logic signed [7:0] cc [8];
  int checks = 0, failures = 0;

  ffe_fir dut (.clk, .reset, .x, .c, .d1, .d2);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 8; j++) begin
      c[j] = coef_t'($urandom); cc[j] = c[j]; hist[j] = 0;
    end
    #12 reset = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      x = XW'($urandom);
      if (i % 200 == 199)   // new coefficient set: restart the history
        for (int j = 0; j < 8; j++) begin c[j] = coef_t'($urandom); cc[j] = c[j]; end
      @(posedge clk);
      // hist[7] = newest sample, weighted by c[7]
      for (int j = 0; j < 7; j++) hist[j] = hist[j+1];
      hist[7] = x;
      #1;
      if (i % 200 < 199 && i % 200 >= 8) begin
        e = ffe_ref(cc, hist);
        checks++;
        if (RW'(d1 + d2) !== e) begin failures++; $display("%0d: %0d vs %0d", i, RW'(d1 + d2), e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
