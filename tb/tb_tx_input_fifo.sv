// tb_tx_input_fifo - writes three rows of random bits with one gap slot in
// 30, loads SR1 into SR2 every 2160 cycles and checks that SR2 returns each
// row's bits in order during the 2088 read cycles of the next row.
module tb_tx_input_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr = 0, din = 0, load = 0, rd = 0, dout;
  tx_input_fifo dut (.clk, .rst_n, .wr, .din, .load, .rd, .dout);
  always #5 clk = ~clk;
  initial begin #1000000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic rows [4][2088];
    int wp, rp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      wp = 0; rp = 0;
      for (int c = 0; c < 2160; c++) begin
        @(negedge clk);
        wr   = (c % 30) != 29;
        din  = 1'($urandom);
        load = (c == 2159);
        rd   = (c >= 72);
        #1;
        if (rd && r > 0) begin
          checks++;
          if (dout !== rows[r-1][rp]) begin failures++; if (failures < 10) $display("FAIL row %0d bit %0d", r, rp); end
          rp++;
        end
        if (wr) begin rows[r][wp] = din; wp++; end
      end
      checks++;
      if (wp != 2088) begin failures++; $display("FAIL writes %0d", wp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
