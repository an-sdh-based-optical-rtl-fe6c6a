// tb_output_fifo - random writes and reads against a queue model; checks
// data order, valid, full and the overflow pulse when writing into a full
// FIFO (small depth to reach full quickly).
module tb_output_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr = 0, ready = 0;
  logic [12:0] din, dout;
  logic valid, full, overflow;
  output_fifo #(.WIDTH(13), .DEPTH(8)) dut (.clk, .rst_n, .wr, .din, .dout, .valid, .ready, .full, .overflow);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [12:0] q [$];
    int novf, exp_ovf;
    novf = 0; exp_ovf = 0;
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic do_wr, do_rd;
      @(negedge clk);
      do_wr = ($urandom % 100) < ((t < 2000) ? 70 : 30);
      do_rd = ($urandom % 100) < ((t < 2000) ? 30 : 70);
      wr = do_wr; ready = do_rd; din = 13'($urandom);
      #1;
      checks++;
      if (valid !== (q.size() != 0) || full !== (q.size() == 8)) begin
        failures++; $display("FAIL flags t=%0d size=%0d", t, q.size());
      end
      if (valid && q.size() != 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data t=%0d", t); end
      end
      @(posedge clk);
      begin
        bit was_full;
        was_full = (q.size() == 8);
        if (do_rd && q.size() != 0) void'(q.pop_front());
        if (do_wr) begin
          if (!was_full) q.push_back(din);
          else exp_ovf++;
        end
      end
      #1;
      if (overflow) novf++;
    end
    checks++;
    if (novf != exp_ovf || exp_ovf == 0) begin failures++; $display("FAIL overflow %0d vs %0d", novf, exp_ovf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
