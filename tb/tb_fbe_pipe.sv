// tb_fbe_pipe: stage 2 of the FBE. First the thesis' worked examples
// (table values A_1..D with a_k = 0 or 1 give SUM_1/SUM_2 such as 208/212
// and 87/91), then random table words and selects: the sums one clock
// after the table words must be A_1/A_3 + B + C + D and A_2/A_4 + B + C + D.
module tb_fbe_pipe
  import mdfe_pkg::*;
;
  logic clk = 0, q0 = 0;
  lut_word_t lut, prev;
  word_t sum_1, sum_2, e1, e2;
  int checks = 0, failures = 0;

  fbe_pipe dut (.clk, .q0, .lut, .sum_1, .sum_2);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic paper(input int v [7], input logic ak, input int s1, input int s2);
    @(negedge clk);
    lut = '{a1: 8'(v[0]), a2: 8'(v[1]), a3: 8'(v[2]), a4: 8'(v[3]),
            b: 8'(v[4]), c: 8'(v[5]), d: 8'(v[6])};
    @(negedge clk);
    q0 = ak; lut = '0; #1;
    checks += 2;
    if (sum_1 !== 8'(s1) || sum_2 !== 8'(s2)) begin
      failures++; $display("paper case: %0d %0d vs %0d %0d", sum_1, sum_2, s1, s2);
    end
  endtask

  initial begin
    lut = '0;
    paper('{4, 8, 12, 16, 19, 28, 157}, 0, 208, 212);
    paper('{1, 5, 9, 13, 19, 25, 34},   1, 87, 91);
    paper('{2, 6, 10, 14, 17, 21, 30},  0, 70, 74);
    paper('{1, 5, 9, 13, 19, 23, 157},  1, 208, 212);
    paper('{1, 5, 9, 13, 18, 25, 33},   0, 77, 81);
    paper('{1, 5, 9, 13, 17, 25, 157},  1, 208, 212);
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      lut  = lut_word_t'({$urandom, $urandom});
      prev = lut;
      @(negedge clk);
      q0 = 1'($urandom);
      #1;
      e1 = (q0 ? prev.a3 : prev.a1) + prev.b + prev.c + prev.d;
      e2 = (q0 ? prev.a4 : prev.a2) + prev.b + prev.c + prev.d;
      checks += 2;
      if (sum_1 !== e1) failures++;
      if (sum_2 !== e2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
