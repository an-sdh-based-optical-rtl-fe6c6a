// sdh_link_top - complete optical-link logic, transmitter and receiver side
// by side, in the configuration of 48 front-end modules read out over one
// 2.488 Gbit/s fibre.
//
// Transmit side (clk_core 155.52 MHz, clk_622 622.08 MHz, clk_bit 2.488 GHz,
// all from the transmitter PLL):
//   48 adc_serializer -> stm1_adapt_mux (12 x 4:1) -> sdh_tx (STM-1 frame
//   building, 3b/4b coding, framing bytes) -> ser_mux 16:4 -> ser_mux 4:1
//   -> tx_serial (to laser driver and laser).
// Receive side (rx_clk_* recovered by the CDR from rx_serial):
//   rx_serial -> des_demux 1:4 -> des_demux 4:16 -> sdh_rx (frame sync,
//   4b/3b decoding, SOH evaluation, output FIFO) -> rx_demux_1to4 (12 x 1:4)
//   -> out_bits, one bit of each of the 48 front-end streams per out_valid.
// The optical parts, the PLL and the CDR are not logic; the fibre is the
// path from tx_serial to rx_serial outside this module. Payload latency is
// about one 2160-cycle row in the transmitter plus the pipeline and FIFO.
// slot_div (transmit side) and rx_slot_div (receive side) select the rate
// reduction: only every n-th interface slot carries front-end data. Both
// ends must be set to the same n; each takes a new value at a frame start.
module sdh_link_top
  import sdh_pkg::*;
#(
  parameter int unsigned M_MUX = 4,
  parameter int unsigned N_AD  = 12
) (
  input  logic                        clk_core,
  input  logic                        clk_622,
  input  logic                        clk_bit,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic [3:0]                  slot_div,    // write every n-th interface slot
  input  logic [N_CH-1:0]             chan_en,
  input  logic [N_AD-1:0]             adc_data [N_CH*M_MUX],
  output logic                        adc_sample,
  output logic                        fe_ce,       // front-end streams advance
  output logic                        fill_data,   // frame being filled carries data
  output logic                        tx_serial,

  input  logic                        rx_clk_core,
  input  logic                        rx_clk_622,
  input  logic                        rx_clk_bit,
  input  logic                        rx_rst_n,
  input  logic                        rx_serial,
  output logic [N_CH*M_MUX-1:0]       out_bits,
  output logic                        out_valid,
  output logic                        out_sof,
  input  logic                        out_ready,
  input  logic [3:0]                  rx_slot_div, // same n as the transmitter
  output rx_protocol_t                protocol,
  output logic [3:0]                  rx_rot
);

  // ---------------- transmit side ----------------
  logic [N_CH*M_MUX-1:0] fe_bits, samples;
  logic [N_CH-1:0]       tx_bits;
  logic                  if_ce, if_sof, tx_fs;
  logic [N_LANE-1:0]     tx_word;
  logic [3:0]            tx_nib;

  for (genvar i = 0; i < N_CH*M_MUX; i++) begin : g_adc
    adc_serializer #(.N_AD(N_AD)) u_ser (
      .clk(clk_core), .rst_n, .ce(fe_ce), .adc_word(adc_data[i]),
      .bit_out(fe_bits[i]), .sample(samples[i])
    );
  end
  assign adc_sample = samples[0];   // all serializers run in step

  stm1_adapt_mux #(.N_CH(N_CH), .M_MUX(M_MUX)) u_adapt (
    .clk(clk_core), .rst_n, .if_ce, .if_sof, .slot_div, .fe_bits, .tx_bits, .fe_ce
  );

  sdh_tx u_tx (
    .clk(clk_core), .rst_n, .enable, .chan_en, .tx_bits, .if_ce, .if_sof,
    .fill_data, .word(tx_word), .frame_start(tx_fs)
  );

  ser_mux #(.IN_W(16), .OUT_W(4)) u_mux16 (
    .clk_slow(clk_core), .clk_fast(clk_622), .rst_n, .din(tx_word), .dout(tx_nib)
  );
  ser_mux #(.IN_W(4), .OUT_W(1)) u_mux4 (
    .clk_slow(clk_622), .clk_fast(clk_bit), .rst_n, .din(tx_nib), .dout(tx_serial)
  );

  // ---------------- receive side ----------------
  logic [3:0]        rx_nib;
  logic [N_LANE-1:0] rx_word;
  logic [N_CH-1:0]   rx_data;
  logic              rx_sof, rx_valid;

  des_demux #(.IN_W(1), .OUT_W(4)) u_dmx4 (
    .clk_fast(rx_clk_bit), .clk_slow(rx_clk_622), .rst_n(rx_rst_n), .din(rx_serial), .dout(rx_nib)
  );
  des_demux #(.IN_W(4), .OUT_W(16)) u_dmx16 (
    .clk_fast(rx_clk_622), .clk_slow(rx_clk_core), .rst_n(rx_rst_n), .din(rx_nib), .dout(rx_word)
  );

  sdh_rx u_rx (
    .clk(rx_clk_core), .rst_n(rx_rst_n), .din(rx_word), .out_data(rx_data),
    .out_sof(rx_sof), .out_valid(rx_valid), .out_ready, .protocol, .rot(rx_rot)
  );

  rx_demux_1to4 #(.N_CH(N_CH), .M_MUX(M_MUX)) u_dmx_out (
    .clk(rx_clk_core), .rst_n(rx_rst_n), .in_valid(rx_valid && out_ready),
    .in_bits(rx_data), .in_sof(rx_sof), .slot_div(rx_slot_div), .out_bits, .out_valid, .out_sof
  );

endmodule
