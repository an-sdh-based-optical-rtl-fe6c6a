// tb_sdh_tx - runs the transmitter for five frames with random channel data,
// Enable switched so that data and idle frames alternate, and one channel
// disabled. The captured words are decoded here with the code table written
// out in this file and the frame is taken apart independently:
//  - every frame starts with 24 {A1,A1}, 24 {A2,A2}, 24 {C1,C1} words;
//  - every other word is a valid code word;
//  - the payload of frame k equals the bits written during fill k-1, or
//    zero for an idle frame or a disabled channel;
//  - row 2 byte 1 = BIP-8 over all words of the previous frame;
//  - row 5 byte 1 = BIP-8 over the channel's previous frame without its
//    first 72 bits; row 9 byte 9 = data/idle status of the next frame;
//    all other SOH bytes zero;
//  - one 16-bit word per clock: 19440 cycles per frame (125 us).
module tb_sdh_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 1;
  logic [11:0] chan_en = 12'hFFF & ~12'h020;
  logic [11:0] tx_bits = 0;
  logic if_ce, if_sof, fill_data, frame_start;
  logic [15:0] word;
  localparam logic [3:0] TAB [8] = '{4'h5, 4'h6, 4'h3, 4'hC, 4'h9, 4'h2, 4'hD, 4'hA};
  localparam int NF = 5;

  sdh_tx dut (.clk, .rst_n, .enable, .chan_en, .tx_bits, .if_ce, .if_sof, .fill_data, .word, .frame_start);
  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int decode(input logic [3:0] c);
    for (int i = 0; i < 8; i++) if (TAB[i] == c) return i;
    return -1;
  endfunction

  logic [11:0] fill  [NF][18792];
  logic        fdata [NF+1];
  logic [15:0] cap   [NF+1][19440];
  int nfill = -1, wp = 0, nfr = -1, wi = 0, last_fs_cyc = 0, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (if_sof) begin nfill++; wp = 0; if (nfill <= NF) fdata[nfill] = fill_data; end
    if (if_ce && nfill >= 0 && nfill < NF) begin
      fill[nfill][wp] = (fill_data ? tx_bits & chan_en : 12'h000);
      wp++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    #1;
    if (frame_start) begin
      if (nfr >= 0) chk(wi == 19440, $sformatf("frame length %0d", wi));
      nfr++; wi = 0;
    end
    if (nfr >= 0 && nfr <= NF) cap[nfr][wi] = word;
    wi++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      forever @(negedge clk) tx_bits = 12'($urandom);
      // fills: 0 data, 1 idle, 2 data, 3 data, 4 idle
      forever begin
        @(posedge clk);
        if (nfill == 0) enable = 0;
        if (nfill == 1) enable = 1;
        if (nfill == 3) enable = 0;
      end
      begin
        wait (nfr == NF);
        check_frames();
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join
  end

  task automatic check_frames();
    logic [7:0] bip1 [NF+1];
    logic [7:0] bip2 [NF+1][12];
    for (int k = 0; k < NF; k++) begin
      bip1[k] = '0;
      for (int c = 0; c < 12; c++) bip2[k][c] = '0;
      for (int p = 0; p < 19440; p++) begin
        int r, col;
        logic [11:0] d;
        r = p / 2160; col = p % 2160;
        bip1[k] ^= cap[k][p][15:8] ^ cap[k][p][7:0];
        if (p < 72) begin
          chk(cap[k][p] == ((p < 24) ? 16'hF6F6 : (p < 48) ? 16'h2828 : 16'h0101), $sformatf("framing f%0d w%0d", k, p));
          continue;
        end
        for (int q = 0; q < 4; q++) begin
          int v; v = decode(cap[k][p][4*q +: 4]);
          chk(v >= 0, $sformatf("code word f%0d p%0d", k, p));
          d[3*q +: 3] = 3'(v);
        end
        for (int c = 0; c < 12; c++) bip2[k][c][7 - p % 8] ^= d[c];
        if (col < 72) begin
          int b, bit_i;
          logic [7:0] exp;
          b = col / 8; bit_i = 7 - col % 8;
          for (int c = 0; c < 12; c++) begin
            exp = 8'h00;
            if (r == 1 && b == 0) exp = (k >= 2) ? bip1[k-1] : 8'hxx;
            if (r == 4 && b == 0) exp = (k >= 2) ? bip2[k-1][c] : 8'hxx;
            if (r == 8 && b == 8) exp = fdata[k] ? 8'hFF : 8'h00;
            if (k >= 2 || !((r == 1 || r == 4) && b == 0))
              chk(d[c] == exp[bit_i], $sformatf("SOH f%0d r%0d byte%0d ch%0d", k, r, b, c));
          end
        end else if (k >= 1) begin
          chk(d == fill[k-1][r * 2088 + col - 72], $sformatf("payload f%0d r%0d c%0d", k, r, col));
        end
      end
    end
    chk(fdata[0] && !fdata[1] && fdata[2] && fdata[3] && !fdata[4], "enable pattern reached the fills");
  endtask
endmodule
