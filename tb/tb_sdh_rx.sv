// tb_sdh_rx - transmitter and receiver logic back to back: the transmitter's
// words are turned into a bit stream, shifted by 11 bits and cut into new
// 16-bit words, so the receiver has to rotate the lanes. Seven frames with
// data and idle fills. Checks:
//  - the receiver synchronizes (HUNT -> PRESYNC -> SYNC) and stays in SYNC;
//  - the output FIFO delivers exactly the channel words written during data
//    fills, in order, with the start-of-frame flag on each frame's first
//    word, and nothing of idle frames; back-pressure from the back end is
//    absorbed by the FIFO;
//  - one line bit flipped into an invalid code word gives exactly one code
//    violation, one B1 error and as many B2 errors as channels it changed;
//  - frame and data-frame counts of the protocol; no loss of frame.
module tb_sdh_rx;
  import sdh_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, out_ready = 1;
  logic [11:0] tx_bits = 0, out_data;
  logic if_ce, if_sof, fill_data, frame_start, out_sof, out_valid;
  logic [15:0] word, rx_word = 0;
  logic [3:0] rot;
  rx_protocol_t protocol;
  localparam logic [3:0] TAB [8] = '{4'h5, 4'h6, 4'h3, 4'hC, 4'h9, 4'h2, 4'hD, 4'hA};
  localparam int NF = 7;

  sdh_tx u_tx (.clk, .rst_n, .enable, .chan_en(12'hFFF), .tx_bits, .if_ce, .if_sof, .fill_data, .word, .frame_start);
  sdh_rx dut (.clk, .rst_n, .din(rx_word), .out_data, .out_sof, .out_valid, .out_ready, .protocol, .rot);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [12:0] expq [$];
  bit bits [$];
  int nfill = -1, nfr = -1, wi = 0, first_in_fill = 0, n_out = 0, n_sof_out = 0, exp_b2 = 0, max_fill = 0;
  int n_presync = 0, n_sync_cyc = 0;
  bit injected = 0;

  // fills 1, 2, 4, 5 carry data (Enable is taken just before each fill)
  always @(posedge clk) if (rst_n) begin
    if (if_sof) begin nfill++; first_in_fill = 1; end
    if (if_ce && fill_data && nfill >= 0) begin
      expq.push_back({1'(first_in_fill), tx_bits});
      first_in_fill = 0;
    end
  end

  initial begin
    repeat (11) bits.push_back(1'b0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    logic [15:0] w;
    tx_bits = 12'($urandom);
    enable  = (nfill == 0 || nfill == 1 || nfill == 3 || nfill == 4);
    out_ready = !(nfr == 3 && wi >= 5000 && wi < 5300);
    w = word;
    // one bit error: frame 4, row 3, word 500, nibble 1 made invalid
    if (nfr == 4 && wi == 3 * 2160 + 500) begin
      logic [3:0] n;
      int v;
      n = w[7:4];
      unique case (n)
        4'h5: n = 4'h4; 4'h6: n = 4'h7; 4'h3: n = 4'h1; 4'hC: n = 4'h8;
        4'h9: n = 4'h8; 4'h2: n = 4'h0; 4'hD: n = 4'hF; default: n = 4'hB;
      endcase
      v = 0;
      for (int i = 0; i < 8; i++) if (TAB[i] == w[7:4]) v = i;
      exp_b2 = $countones(3'(v));
      w[7:4] = n;
      injected = 1;
    end
    for (int b = 15; b >= 0; b--) bits.push_back(w[b]);
    for (int b = 15; b >= 0; b--) rx_word[b] = bits.pop_front();
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (frame_start) begin nfr++; wi = 0; end else wi++;
    if (protocol.state == FS_PRESYNC) n_presync++;
    if (protocol.state == FS_SYNC) n_sync_cyc++;
    if (out_valid && out_ready) begin
      n_out++;
      if (out_sof) n_sof_out++;
      chk(expq.size() > 0 && {out_sof, out_data} == expq[0], $sformatf("output word %0d", n_out));
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (nfr == NF) begin
      chk(n_presync > 0 && n_sync_cyc > 4 * 19440, "synchronization");
      chk(protocol.state == FS_SYNC, "state");
      chk(n_sof_out == 4, $sformatf("data frames delivered %0d", n_sof_out));
      chk(n_out == 3 * 18792 + 0 || n_out > 3 * 18792, $sformatf("words delivered %0d", n_out));
      chk(injected && protocol.code_viol == 16'd1, $sformatf("code violations %0d", protocol.code_viol));
      chk(protocol.b1_err == 16'd1, $sformatf("B1 errors %0d", protocol.b1_err));
      chk(protocol.b2_err == 16'(exp_b2), $sformatf("B2 errors %0d exp %0d", protocol.b2_err, exp_b2));
      chk(protocol.lof == 0 && protocol.overflow == 0, "no loss of frame, no overflow");
      chk(protocol.frames >= 16'd5, $sformatf("frames %0d", protocol.frames));
      chk(protocol.data_frames >= 16'd3, $sformatf("data frames %0d", protocol.data_frames));
      $display("rot %0d frames %0d data %0d cv %0d b1 %0d b2 %0d", rot, protocol.frames, protocol.data_frames,
               protocol.code_viol, protocol.b1_err, protocol.b2_err);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
