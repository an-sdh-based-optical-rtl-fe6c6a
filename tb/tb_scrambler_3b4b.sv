// tb_scrambler_3b4b - random 12-bit inputs through the four 3b/4b coders.
// Checks every output word against the code table written out here, the
// one-cycle latency, that the serial stream (lane 15 first) never holds more
// than four equal bits in a row, and that ones and zeros stay balanced.
module tb_scrambler_3b4b;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [11:0] din;
  logic [15:0] dout;
  localparam logic [3:0] TAB [8] = '{4'h5, 4'h6, 4'h3, 4'hC, 4'h9, 4'h2, 4'hD, 4'hA};

  scrambler_3b4b dut (.clk, .rst_n, .din, .dout);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int run, maxrun, ones, zeros;
    logic last;
    run = 0; maxrun = 0; ones = 0; zeros = 0; last = 1'b0;
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      logic [11:0] x;
      logic [15:0] exp;
      x = 12'($urandom);
      @(negedge clk) din = x;
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) exp[4*k +: 4] = TAB[x[3*k +: 3]];
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL in %h got %h exp %h", x, dout, exp); end
      for (int b = 15; b >= 0; b--) begin
        if (dout[b]) ones++; else zeros++;
        if (t > 0 && dout[b] == last) run++; else run = 1;
        last = dout[b];
        if (run > maxrun) maxrun = run;
      end
    end
    checks++;
    if (maxrun > 4) begin failures++; $display("FAIL run of %0d", maxrun); end
    checks++;
    if (ones - zeros > 2000 || zeros - ones > 2000) begin failures++; $display("FAIL disparity %0d", ones - zeros); end
    $display("max run %0d, disparity %0d", maxrun, ones - zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
