// tb_sft_11: checks the FBE serial-to-parallel converter against a shift
// model over random serial data, and its asynchronous reset.
module tb_sft_11;
  logic sclk = 0, sreset_n = 0, ini = 0;
  logic [10:0] initial_data, model;
  int checks = 0, failures = 0;

  sft_11 dut (.sclk, .sreset_n, .ini, .initial_data);

  always #5 sclk = ~sclk;

  initial begin
    repeat (2000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 sreset_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge sclk);
      ini = 1'($urandom);
      @(posedge sclk);
      model = {model[9:0], ini};
      #1;
      checks++;
      if (initial_data !== model) begin
        failures++;
        $display("mismatch %0d: %h vs %h", i, initial_data, model);
      end
    end
    // a word sent MSB first lands in bits 10..0
    for (int i = 10; i >= 0; i--) begin
      @(negedge sclk); ini = 11'h5A3 >> i;
    end
    @(posedge sclk); #1;
    checks++; if (initial_data !== 11'h5A3) failures++;
    sreset_n = 0; #1;
    checks++; if (initial_data !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
