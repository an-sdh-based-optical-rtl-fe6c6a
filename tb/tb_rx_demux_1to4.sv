// tb_rx_demux_1to4 - random 12-bit words with occasional gaps in in_valid
// and start-of-frame flags; checks that each output set holds bit c of the
// m-th word after the phase start at position 4c+m, and the out_sof flag.
// slot_div goes from 1 to 2 and then 3 in the middle of frames; from the
// next start of frame on only every 2nd or 3rd word may be used.
module tb_rx_demux_1to4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [3:0] slot_div = 4'd1;
  logic [11:0] in_bits = 0;
  logic [47:0] out_bits;
  logic out_valid, out_sof;
  rx_demux_1to4 dut (.clk, .rst_n, .in_valid, .in_bits, .in_sof, .slot_div, .out_bits, .out_valid, .out_sof);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [11:0] grp [4];
    logic        gsof;
    int ph, nout, nexp, sc, dv, ndrop;
    logic use_word;
    ph = 0; nout = 0; nexp = 0; gsof = 0; sc = 0; dv = 1; ndrop = 0; use_word = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0 || (t % 997) == 5;
      in_bits  = 12'($urandom);
      in_sof   = (t % 997) == 5;
      if (t == 1200) slot_div = 4'd2;
      if (t == 2500) slot_div = 4'd3;
      if (in_valid) begin
        if (in_sof) begin ph = 0; sc = 0; dv = int'(slot_div); end
        use_word = (sc == 0);
        if (use_word) begin
          if (ph == 0) gsof = in_sof;
          grp[ph] = in_bits;
        end else ndrop++;
      end
      @(posedge clk); #1;
      if (in_valid && use_word && ph == 3) begin
        nexp++;
        checks++;
        if (!out_valid) begin failures++; $display("FAIL no output t=%0d", t); end
        for (int c = 0; c < 12; c++)
          for (int m = 0; m < 4; m++) begin
            checks++;
            if (out_bits[4*c + m] !== grp[m][c]) begin failures++; if (failures < 10) $display("FAIL bit c%0d m%0d", c, m); end
          end
        checks++;
        if (out_sof !== gsof) begin failures++; $display("FAIL out_sof t=%0d", t); end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL stray output t=%0d", t); end
      end
      if (out_valid) nout++;
      if (in_valid) begin
        if (use_word) ph = (ph + 1) % 4;
        sc = (dv <= 1 || sc == dv - 1) ? 0 : sc + 1;
      end
    end
    checks++;
    if (nout != nexp || nexp < 300) begin failures++; $display("FAIL count %0d %0d", nout, nexp); end
    checks++;
    if (ndrop < 700) begin failures++; $display("FAIL dropped words %0d", ndrop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
