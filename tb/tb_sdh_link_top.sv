// tb_sdh_link_top - end-to-end test of the whole link at its default sizes
// (48 front-end streams, 12 channels, 2.488 Gbit/s serial line), 14 frames
// (1.75 ms of link time).
//
// Clocks: bit clock period 2, 622 MHz clock period 8, core clock period 32
// time units; the receiver uses the same clocks (a CDR would recover them)
// and the fibre is a delay of LINE_DELAY bit periods, so the receiver has to
// find the lane rotation. Random A/D words feed the 48 serializers; the bits
// they hand over while a data frame is filled are recorded here and must come
// out of the receiver as the same 48-bit sets, in order.
// Scenario (fill k is sent in transmitter frame k):
//   fills 1, 2, 4, 5, 12, 13 carry data, the others are idle cells;
//   channel 5 is disabled (its four streams must read zero);
//   frame 2: the back end stalls for 300 cycles (FIFO absorbs it);
//   frame 4: 8 line bits forced to one (code violation, B1 error);
//   frames 6-10: the line is dead (loss of frame, then resynchronization);
//   frame 13: the back end stops (FIFO overflow);
//   frame 8 (line dead): both ends switch to writing only every 3rd
//   interface slot, so fill 12 delivers 18792 / 3 / 4 = 1566 sets instead of
//   4698.
// Each of these mechanisms is counted and must have happened.
module tb_sdh_link_top;
  import sdh_pkg::*;
  localparam int FRAME = 19440;            // core cycles per frame
  localparam int LINE_DELAY = 21;
  localparam int NFR = 14;

  int checks = 0, failures = 0;
  logic clk_bit = 0, clk_622 = 0, clk_core = 0, rst_n = 0;
  logic enable = 0, out_ready = 1;
  logic [3:0] slot_div = 4'd1, rx_slot_div = 4'd1;
  logic [11:0] chan_en = 12'hFFF & ~12'h020;
  logic [11:0] adc_data [48];
  logic adc_sample, fe_ce, fill_data, tx_serial, rx_serial;
  logic [47:0] out_bits;
  logic out_valid, out_sof;
  rx_protocol_t protocol;
  logic [3:0] rx_rot;

  sdh_link_top dut (
    .clk_core, .clk_622, .clk_bit, .rst_n, .enable, .slot_div, .chan_en, .adc_data, .adc_sample, .fe_ce,
    .fill_data, .tx_serial,
    .rx_clk_core(clk_core), .rx_clk_622(clk_622), .rx_clk_bit(clk_bit), .rx_rst_n(rst_n),
    .rx_serial, .out_bits, .out_valid, .out_sof, .out_ready, .rx_slot_div, .protocol, .rx_rot
  );

  always #1  clk_bit  = ~clk_bit;
  always #4  clk_622  = ~clk_622;
  always #16 clk_core = ~clk_core;

  initial begin
    #(64'd32 * 64'(FRAME) * 64'(NFR + 2));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---- fibre: delay line, dead between frames 6 and 10, 8 bits forced in frame 4
  logic [LINE_DELAY-1:0] line = '0;
  longint bitcyc = 0;
  localparam longint BREAK_ON  = 64'd16 * (6 * FRAME + 100);
  localparam longint BREAK_OFF = 64'd16 * (10 * FRAME + 5000);
  localparam longint HIT       = 64'd16 * (4 * FRAME + 9000);
  always @(posedge clk_bit) if (rst_n) begin
    bitcyc <= bitcyc + 1;
    line   <= {line[LINE_DELAY-2:0], tx_serial};
  end
  assign rx_serial = (bitcyc >= BREAK_ON && bitcyc < BREAK_OFF) ? 1'b0 :
                     (bitcyc >= HIT && bitcyc < HIT + 8)        ? 1'b1 : line[LINE_DELAY-1];

  // ---- front end: A/D words and the bit each stream hands over
  logic [11:0] words [48][$];
  int          nbit = 0;            // bits handed over per stream so far
  logic [47:0] expq [$];
  int cyc = 0, n_sample = 0;

  function automatic logic stream_bit(input int i, input int j);
    // bit j of stream i: a 0 before the first load, then the words MSB first
    if (j == 0) return 1'b0;
    return words[i][(j - 1) / 12][11 - (j - 1) % 12];
  endfunction

  function automatic bit data_fill(input int k);
    return k == 1 || k == 2 || k == 4 || k == 5 || k == 12 || k == 13;
  endfunction

  initial begin
    for (int i = 0; i < 48; i++) begin adc_data[i] = 12'($urandom); words[i].push_back(adc_data[i]); end
    #40 rst_n = 1;
  end

  always @(posedge clk_core) if (rst_n) begin
    logic [47:0] s;
    cyc <= cyc + 1;
    if (fe_ce) begin
      if (fill_data) begin
        for (int i = 0; i < 48; i++) s[i] = chan_en[i / 4] ? stream_bit(i, nbit) : 1'b0;
        expq.push_back(s);
      end
      nbit++;
    end
    if (adc_sample) begin
      n_sample++;
      for (int i = 0; i < 48; i++) begin adc_data[i] <= 12'($urandom); end
    end
  end
  // the word loaded at each sample is the value presented just before it
  always @(posedge clk_core) if (rst_n && adc_sample) begin
    #1;
    for (int i = 0; i < 48; i++) words[i].push_back(adc_data[i]);
  end

  // enable: the decision for fill k falls at about 19440k - 2160 cycles
  always @(negedge clk_core) begin
    enable    <= data_fill((cyc + 2160 + FRAME / 2) / FRAME);
    if (cyc == 8 * FRAME) begin slot_div <= 4'd3; rx_slot_div <= 4'd3; end
    out_ready <= !((cyc >= 2 * FRAME + 5000 && cyc < 2 * FRAME + 5300) || cyc >= 13 * FRAME + 5000);
  end

  // ---- receiver side
  int sets_per_frame [$];
  int n_out = 0, n_cmp = 0, n_corrupt = 0, n_stall = 0, n_hunt_to_pre = 0, n_rot = 0;
  fs_state_t last_state = FS_HUNT;
  always @(posedge clk_core) if (rst_n) begin
    #2;
    if (protocol.state == FS_PRESYNC && last_state == FS_HUNT) n_hunt_to_pre++;
    last_state = protocol.state;
    if (protocol.state == FS_SYNC && rx_rot != 0) n_rot++;
    if (!out_ready && dut.u_rx.out_valid) n_stall++;
    if (out_valid) begin
      n_out++;
      if (out_sof) sets_per_frame.push_back(0);
      if (sets_per_frame.size() > 0) sets_per_frame[sets_per_frame.size() - 1]++;
      if (cyc < 13 * FRAME + 5000) begin
        n_cmp++;
        // sets carrying the forced line bits may differ; they are counted
        if (expq.size() > 0 && out_bits != expq[0] && cyc > 4 * FRAME + 9000 && cyc < 4 * FRAME + 13000)
          n_corrupt++;
        else
          chk(expq.size() > 0 && out_bits == expq[0], $sformatf("48-bit set %0d", n_out));
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (cyc == NFR * FRAME + 3000) begin
      $display("sets compared %0d, frames %0d data %0d cv %0d b1 %0d b2 %0d lof %0d ovf %0d syncs %0d rot %0d",
               n_cmp, protocol.frames, protocol.data_frames, protocol.code_viol, protocol.b1_err,
               protocol.b2_err, protocol.lof, protocol.overflow, n_hunt_to_pre, rx_rot);
      $display("sets per delivered frame: %p", sets_per_frame);
      chk(sets_per_frame.size() == 6, "six data frames delivered (fills 1, 2, 4, 5, 12, 13)");
      for (int k = 0; k < 4 && k < sets_per_frame.size(); k++)
        chk(sets_per_frame[k] == 4698, $sformatf("frame %0d: every slot used", k));
      chk(sets_per_frame.size() > 4 && sets_per_frame[4] == 1566, "every 3rd slot used after the switch");
      chk(n_corrupt >= 1 && n_corrupt <= 3, $sformatf("sets hit by the line error %0d", n_corrupt));
      chk(n_cmp >= 4 * 4698, "payload of four data frames delivered");
      chk(protocol.data_frames >= 5, "data frames counted");
      chk(protocol.frames > protocol.data_frames, "idle frames counted");
      chk(n_hunt_to_pre == 2, "frame found twice (start, after loss of frame)");
      chk(n_rot > 0, "lanes rotated");
      chk(protocol.code_viol > 0, "code violations detected");
      chk(protocol.b1_err > 0, "B1 parity errors detected");
      chk(protocol.b2_err > 0, "B2 parity errors detected");
      chk(protocol.lof == 1, "one loss of frame");
      chk(protocol.state == FS_SYNC, "in sync at the end");
      chk(n_stall > 0, "back-end stall absorbed");
      chk(protocol.overflow > 0, "FIFO overflow reported");
      chk(n_sample > 1000, "A/D words taken");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
