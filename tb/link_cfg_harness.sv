// link_cfg_harness - drives and checks one complete link (sdh_link_top) for
// a given multiplexing grade M_MUX and A/D resolution N_AD. It is used by
// tb_link_configs to run the front-end configurations other than the default
// one; it has no $finish of its own.
//
// The harness owns the front end and the back end of one link. It hands
// random N_AD-bit A/D words to the 12*M_MUX serializers. It records every
// set of bits the serializers hand over while a data frame is filled, and
// compares the sets leaving the receiver with these, in order. The fibre is
// a delay of LINE_DELAY bit periods. Fill 0 is idle and fills 1.. carry data
// on all channels. The line is clean, so no error counter may move.
//
// Checks, besides the data itself:
//  - the payload of NFR-1 frames is delivered: 18792 / M_MUX sets each;
//  - each stream advances exactly 18792 / M_MUX times per 125 us frame;
//  - a new A/D word is taken every N_AD stream bits;
//  - every delivered frame begins with a set marked as start of frame;
//  - the time from hand-over at the front end to the output is nearly
//    constant and about one 2160-cycle row (printed in us);
//  - the receiver is in SYNC with all error counters at zero.
// Ports: the three clocks and reset shared by both ends; `checks` and
// `failures` are running totals and `done` rises when the run has ended.
module link_cfg_harness
  import sdh_pkg::*;
#(
  parameter int unsigned M_MUX      = 8,
  parameter int unsigned N_AD       = 12,
  parameter int unsigned LINE_DELAY = 13,
  parameter int unsigned NFR        = 4
) (
  input  logic clk_bit,
  input  logic clk_622,
  input  logic clk_core,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int FRAME = 19440;
  localparam int NS    = N_CH * M_MUX;
  localparam int SETS  = N_CH * PAY_BITS * ROWS / NS;   // output sets (bits per stream) per frame

  logic enable = 0, out_ready = 1;
  logic [N_CH-1:0] chan_en = '1;
  logic [N_AD-1:0] adc_data [NS];
  logic adc_sample, fe_ce, fill_data, tx_serial, rx_serial;
  logic [NS-1:0] out_bits;
  logic out_valid, out_sof;
  rx_protocol_t protocol;
  logic [3:0] rx_rot;

  sdh_link_top #(.M_MUX(M_MUX), .N_AD(N_AD)) dut (
    .clk_core, .clk_622, .clk_bit, .rst_n, .enable, .slot_div(4'd1), .chan_en, .adc_data, .adc_sample, .fe_ce,
    .fill_data, .tx_serial,
    .rx_clk_core(clk_core), .rx_clk_622(clk_622), .rx_clk_bit(clk_bit), .rx_rst_n(rst_n),
    .rx_serial, .out_bits, .out_valid, .out_sof, .out_ready, .rx_slot_div(4'd1), .protocol, .rx_rot
  );

  initial begin checks = 0; failures = 0; done = 0; end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL M_MUX=%0d N_AD=%0d: %s", M_MUX, N_AD, what);
    end
  endtask

  // fibre
  logic [LINE_DELAY-1:0] line = '0;
  always @(posedge clk_bit) if (rst_n) line <= {line[LINE_DELAY-2:0], tx_serial};
  assign rx_serial = line[LINE_DELAY-1];

  // front end
  logic [N_AD-1:0] words [NS][$];
  int          nbit = 0;
  logic [NS-1:0] expq [$];
  int            tq [$];                     // cycle each set was handed over
  int            lat_min = 1 << 30, lat_max = 0;
  int cyc = 0, n_sample = 0, ce_since_sample = 0, n_ce_frame = 0;

  function automatic logic stream_bit(input int i, input int j);
    // bit j of stream i: a 0 before the first load, then the words MSB first
    if (j == 0) return 1'b0;
    return words[i][(j - 1) / N_AD][N_AD - 1 - (j - 1) % N_AD];
  endfunction

  initial
    for (int i = 0; i < NS; i++) begin
      adc_data[i] = N_AD'($urandom);
      words[i].push_back(adc_data[i]);
    end

  always @(posedge clk_core) if (rst_n) begin
    logic [NS-1:0] s;
    cyc <= cyc + 1;
    // sample follows the stream step that loaded the word by one cycle
    if (adc_sample) begin
      if (n_sample > 0) chk(ce_since_sample == N_AD, $sformatf("stream bits per A/D word %0d", ce_since_sample));
      ce_since_sample = 0;
      n_sample++;
      for (int i = 0; i < NS; i++) adc_data[i] <= N_AD'($urandom);
    end
    if (fe_ce) begin
      if (fill_data) begin
        for (int i = 0; i < NS; i++) s[i] = stream_bit(i, nbit);
        expq.push_back(s);
        tq.push_back(cyc);
      end
      nbit++;
      ce_since_sample++;
      if (cyc >= 2 * FRAME && cyc < 3 * FRAME) n_ce_frame++;
    end
  end
  always @(posedge clk_core) if (rst_n && adc_sample) begin
    #1;
    for (int i = 0; i < NS; i++) words[i].push_back(adc_data[i]);
  end

  // fill 0 idle, all later fills carry data
  always @(negedge clk_core) enable <= ((cyc + 2160 + FRAME / 2) / FRAME) >= 1;

  // back end
  int n_cmp = 0, n_sof = 0, n_frame_sets = 0;
  always @(posedge clk_core) if (rst_n && !done) begin
    #2;
    if (out_valid) begin
      n_cmp++;
      if (out_sof) n_sof++;
      if (n_sof >= 1 && n_sof <= NFR - 1) n_frame_sets++;
      chk(expq.size() > 0 && out_bits == expq[0], $sformatf("set %0d", n_cmp));
      if (expq.size() > 0) void'(expq.pop_front());
      if (tq.size() > 0) begin
        if (cyc - tq[0] < lat_min) lat_min = cyc - tq[0];
        if (cyc - tq[0] > lat_max) lat_max = cyc - tq[0];
        void'(tq.pop_front());
      end
    end
    if (cyc == NFR * FRAME + 3000) begin
      $display("M_MUX=%0d N_AD=%0d: sets %0d, stream bits per frame %0d, A/D words %0d, frames %0d data %0d, rot %0d",
               M_MUX, N_AD, n_cmp, n_ce_frame, n_sample, protocol.frames, protocol.data_frames, rx_rot);
      $display("M_MUX=%0d N_AD=%0d: latency %0d..%0d core cycles (%0.1f..%0.1f us)", M_MUX, N_AD,
               lat_min, lat_max, lat_min / 155.52, lat_max / 155.52);
      chk(lat_max - lat_min < 200, "latency nearly constant");
      chk(lat_max < 2 * 2160 + 200, "latency about one row");
      chk(n_frame_sets == (NFR - 1) * SETS,
          $sformatf("%0d sets in frames 1..%0d, expected %0d", n_frame_sets, NFR - 1, (NFR - 1) * SETS));
      chk(n_sof == NFR, "start of each delivered frame marked");
      chk(n_ce_frame == SETS, $sformatf("stream bits per frame %0d, expected %0d", n_ce_frame, SETS));
      chk(n_sample >= (NFR * SETS) / N_AD - 1, "A/D words taken");
      chk(protocol.state == FS_SYNC, "in sync");
      chk(protocol.data_frames == 16'(NFR - 1), "data frames counted");
      chk(protocol.code_viol == 0 && protocol.b1_err == 0 && protocol.b2_err == 0, "no errors on a clean line");
      chk(protocol.lof == 0 && protocol.overflow == 0, "no loss of frame, no overflow");
      done = 1;
    end
  end
endmodule
