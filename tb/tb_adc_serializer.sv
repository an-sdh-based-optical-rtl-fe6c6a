// tb_adc_serializer - loads random 12-bit words and checks that bit_out
// gives them MSB first, one bit per ce, and that sample pulses once per word.
module tb_adc_serializer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [11:0] adc_word;
  logic bit_out, sample;
  adc_serializer dut (.clk, .rst_n, .ce, .adc_word, .bit_out, .sample);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [11:0] words [20];
    int nsample;
    nsample = 0;
    adc_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      words[w] = 12'($urandom);
      @(negedge clk) begin adc_word = words[w]; ce = 1; end
      @(posedge clk); #1 ce = 0;
      checks++;
      if (!sample) begin failures++; $display("FAIL no sample pulse word %0d", w); end
      nsample++;
      for (int b = 11; b >= 0; b--) begin
        repeat (3) begin
          @(posedge clk); #1;
          checks++;
          if (bit_out !== words[w][b]) begin failures++; $display("FAIL word %0d bit %0d", w, b); end
          if (sample) begin failures++; $display("FAIL stray sample"); end
        end
        if (b > 0) begin
          @(negedge clk) ce = 1;
          @(posedge clk); #1 ce = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
