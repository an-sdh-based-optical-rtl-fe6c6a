// tb_descrambler_4b3b - feeds every 4-baud word to each of the four
// decoders and checks data and violation flags against the code table
// written out here, plus the one-cycle latency.
module tb_descrambler_4b3b;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] din;
  logic [11:0] dout;
  logic [3:0]  viol;
  localparam logic [3:0] TAB [8] = '{4'h5, 4'h6, 4'h3, 4'hC, 4'h9, 4'h2, 4'hD, 4'hA};

  descrambler_4b3b dut (.clk, .rst_n, .din, .dout, .viol);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [15:0] w;
      w = 16'($urandom);
      if (t < 16) w = {4{4'(t)}};
      @(negedge clk) din = w;
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin
        int idx; idx = -1;
        for (int i = 0; i < 8; i++) if (TAB[i] == w[4*k +: 4]) idx = i;
        checks++;
        if (idx < 0) begin
          if (!viol[k] || dout[3*k +: 3] != 3'b000) begin failures++; $display("FAIL bad %h k=%0d", w, k); end
        end else if (viol[k] || dout[3*k +: 3] != 3'(idx)) begin
          failures++; $display("FAIL %h k=%0d got %0d", w, k, dout[3*k +: 3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
