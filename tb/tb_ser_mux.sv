// tb_ser_mux - 16:4 multiplexer with a 4x faster clock: random words in, the
// 4-bit output stream is collected and must give back every word in order,
// most significant nibble first, with a constant latency.
module tb_ser_mux;
  int checks = 0, failures = 0;
  logic clk_slow = 0, clk_fast = 0, rst_n = 0;
  logic [15:0] din = 0;
  logic [3:0]  dout;
  ser_mux #(.IN_W(16), .OUT_W(4)) dut (.clk_slow, .clk_fast, .rst_n, .din, .dout);
  always #2 clk_fast = ~clk_fast;
  always #8 clk_slow = ~clk_slow;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [15:0] sent [$];
  logic [63:0] hist;
  int          found_at;

  initial begin
    hist = '0; found_at = -1;
    #3 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk_slow) din = 16'($urandom);
      sent.push_back(din);
    end
    // each fast cycle one nibble: look for the stream of words 10..299
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect the output and compare with the sent words once aligned
  int nib_cnt = 0;
  int widx = -1;
  logic [15:0] acc;
  always @(posedge clk_fast) if (rst_n) begin
    acc = {acc[11:0], dout};
    nib_cnt++;
    if (widx < 0 && sent.size() > 12) begin
      // alignment: find the first sent word equal to the last 16 bits seen
      for (int i = 0; i < sent.size(); i++) if (acc == sent[i] && i >= 5) begin widx = i + 1; nib_cnt = 0; break; end
    end else if (widx >= 0 && nib_cnt == 4) begin
      nib_cnt = 0;
      if (widx < sent.size()) begin
        checks++;
        if (acc !== sent[widx]) begin failures++; if (failures < 10) $display("FAIL word %0d %h vs %h", widx, acc, sent[widx]); end
      end
      widx++;
    end
  end
endmodule
