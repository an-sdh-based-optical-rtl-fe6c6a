// tb_des_demux - 4:16 demultiplexer: a random nibble stream goes in and
// every output word must equal four consecutive nibbles of that stream, the
// word boundary being the same for all words.
module tb_des_demux;
  int checks = 0, failures = 0;
  logic clk_slow = 0, clk_fast = 0, rst_n = 0;
  logic [3:0]  din = 0;
  logic [15:0] dout;
  des_demux #(.IN_W(4), .OUT_W(16)) dut (.clk_fast, .clk_slow, .rst_n, .din, .dout);
  always #2 clk_fast = ~clk_fast;
  always #8 clk_slow = ~clk_slow;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [3:0] stream [$];
  initial begin
    int phase, pos;
    phase = -1;
    #3 rst_n = 1;
    fork
      forever begin
        @(negedge clk_fast) din = 4'($urandom);
        stream.push_back(din);
      end
      begin
        repeat (4) @(posedge clk_slow);
        for (int t = 0; t < 300; t++) begin
          @(posedge clk_slow); #1;
          // find where the word sits in the stream (near the end)
          pos = -1;
          for (int i = stream.size() - 4; i >= stream.size() - 12 && i >= 0; i--)
            if ({stream[i], stream[i+1], stream[i+2], stream[i+3]} == dout) begin pos = i; break; end
          checks++;
          if (pos < 0) begin failures++; if (failures < 10) $display("FAIL word %h not in stream", dout); end
          else begin
            if (phase < 0) phase = pos % 4;
            checks++;
            if (pos % 4 != phase) begin failures++; $display("FAIL boundary moved"); end
          end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join
  end
endmodule
