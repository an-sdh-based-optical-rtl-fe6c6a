// tb_coding_stats - line-code statistics of the parallel 3b/4b coder.
// All 2^12 input combinations of the four coders are sent through
// scrambler_3b4b one after another and the serial stream (lane 15 first) is
// analysed: the relative frequency of runs of 1..4 equal bits, the longest
// run (at most 4, i.e. a minimum transition density of 0.25), the share of
// runs no longer than two bits (expected above 0.87) and the balance of ones
// and zeros over all combinations (expected equal).
// A second pass sends 10,000 words of PRBS-23 data (x^23 + x^18 + 1, 12 bits
// per word) and follows the running disparity, the count of ones minus
// zeros on the line. Each code word is balanced except those of 101 and 110
// (-2 and +2), so the disparity wanders like a random walk with a standard
// deviation of about 2 x sqrt(10,000) = 200 bits. A code that was unbalanced
// by even 0.1 bit per word would drift past 1,000.
module tb_coding_stats;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [11:0] din = 0;
  logic [15:0] dout;
  scrambler_3b4b dut (.clk, .rst_n, .din, .dout);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int hist [1:16];
    int run, ones, zeros, total, maxrun;
    logic last;
    real short_share;
    for (int i = 1; i <= 16; i++) hist[i] = 0;
    run = 0; ones = 0; zeros = 0; total = 0; maxrun = 0; last = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int x = 0; x < 4096; x++) begin
      @(negedge clk) din = 12'(x);
      @(posedge clk); #1;
      for (int b = 15; b >= 0; b--) begin
        if (dout[b]) ones++; else zeros++;
        if (x == 0 && b == 15) run = 1;
        else if (dout[b] == last) run++;
        else begin hist[run]++; total++; run = 1; end
        last = dout[b];
        if (run > maxrun) maxrun = run;
      end
    end
    hist[run]++; total++;
    short_share = real'(hist[1] + hist[2]) / real'(total);
    $display("runs of 1..4 equal bits: %0.3f %0.3f %0.3f %0.3f, longest %0d, ones %0d zeros %0d",
             real'(hist[1]) / total, real'(hist[2]) / total, real'(hist[3]) / total, real'(hist[4]) / total,
             maxrun, ones, zeros);
    checks++; if (maxrun > 4) begin failures++; $display("FAIL longest run %0d", maxrun); end
    checks++; if (short_share <= 0.87) begin failures++; $display("FAIL short runs %0.3f", short_share); end
    checks++; if (ones != zeros) begin failures++; $display("FAIL balance"); end

    begin
      logic [22:0] prbs;
      int disp, maxdisp;
      prbs = 23'h7FFFFF; disp = 0; maxdisp = 0;
      for (int w = 0; w < 10000; w++) begin
        for (int b = 0; b < 12; b++) prbs = {prbs[21:0], prbs[22] ^ prbs[17]};
        @(negedge clk) din = prbs[11:0];
        @(posedge clk); #1;
        for (int b = 15; b >= 0; b--) disp += dout[b] ? 1 : -1;
        if (disp > maxdisp) maxdisp = disp;
        if (-disp > maxdisp) maxdisp = -disp;
      end
      $display("PRBS-23, 10000 words: largest running disparity %0d, final %0d", maxdisp, disp);
      checks++; if (maxdisp >= 1000) begin failures++; $display("FAIL disparity %0d", maxdisp); end
      checks++; if (maxdisp < 20) begin failures++; $display("FAIL disparity implausibly small %0d", maxdisp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
