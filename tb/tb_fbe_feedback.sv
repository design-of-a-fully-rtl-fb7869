// tb_fbe_feedback: stage 3 of the FBE. First the six typical cases worked
// in the thesis (four look-ahead selections, a positive and a negative
// overflow), then random SUM_1/SUM_2, select, FE and Begin against the
// slicer model of mdfe_ref_pkg.
module tb_fbe_feedback
  import mdfe_pkg::*;
  import mdfe_ref_pkg::*;
;
  logic clk = 0, q0 = 0, fbe_begin = 1;
  word_t fe = 0, sum_1 = 0, sum_2 = 0, fb, sum;
  logic ak, over_pos, over_neg;
  word_t p1, p2, efb, esum;
  logic epos, eneg, ea;
  int checks = 0, failures = 0, npos = 0, nneg = 0;

  fbe_feedback dut (.clk, .fe, .sum_1, .sum_2, .fbe_begin, .q0, .fb, .sum,
                    .ak, .over_pos, .over_neg);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic paper(input int s1, input int s2, input logic sel, input int fe_v,
                       input int fb_v, input int sum_v, input logic a, input logic p,
                       input logic n);
    @(negedge clk);
    sum_1 = 8'(s1); sum_2 = 8'(s2);
    @(negedge clk);
    q0 = sel; fe = 8'(fe_v); fbe_begin = 1; #1;
    checks++;
    if (fb !== 8'(fb_v) || sum !== 8'(sum_v) || ak !== a || over_pos !== p || over_neg !== n) begin
      failures++;
      $display("paper case: fb=%0d sum=%0d ak=%b pos=%b neg=%b", fb, sum, ak, over_pos, over_neg);
    end
  endtask

  initial begin
    paper(208, 212, 0, 0,   208, 208, 1, 0, 0);   // case 1
    paper(87,  91,  0, 203, 87,  34,  0, 0, 0);   // case 2
    paper(70,  74,  1, 0,   74,  74,  0, 0, 0);   // case 3
    paper(208, 212, 1, 67,  212, 23,  0, 0, 0);   // case 4 (279 mod 256)
    paper(77,  81,  0, 52,  77,  129, 0, 1, 0);   // case 5, positive overflow
    paper(208, 212, 0, 128, 208, 80,  1, 0, 1);   // case 6, negative overflow
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      p1 = 8'($urandom); p2 = 8'($urandom);
      sum_1 = p1; sum_2 = p2;
      @(negedge clk);
      q0 = 1'($urandom); fe = 8'($urandom); fbe_begin = ($urandom % 8) != 0;
      sum_1 = 8'($urandom); sum_2 = 8'($urandom);
      #1;
      efb = q0 ? p2 : p1;
      decide_ref(fe, efb, fbe_begin, esum, epos, eneg, ea);
      checks++;
      if (fb !== efb || sum !== esum || over_pos !== epos || over_neg !== eneg || ak !== ea) begin
        failures++;
        $display("rand %0d: fb %0d/%0d sum %0d/%0d ak %b/%b", i, fb, efb, sum, esum, ak, ea);
      end
      npos += int'(epos); nneg += int'(eneg);
    end
    checks++; if (npos == 0 || nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
