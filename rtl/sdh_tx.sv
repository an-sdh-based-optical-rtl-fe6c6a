// sdh_tx - transmitter logic: STM-1 frame building, 3b/4b scrambling and
// SOH generator II, all at 155.52 MHz.
//
// Each of the 12 channel inputs takes one bit per interface slot (if_ce,
// 29 of 30 core cycles = 150.336 Mbit/s). Per channel, the input FIFO
// (SR1/SR2) and SOH generator I (SOH-R/SR3/SR4) turn the stream into STM-1
// rows: 72 SOH bits then 2088 payload bits, 9 rows per frame. All twelve
// channels run in lock step under one tx_controller. The 3b/4b coder turns
// the 12 channel bits of a cycle into a 16-bit word and SOH generator II
// puts the uncoded framing pattern at the head of each frame. word leaves
// two cycles after the channel bits it is made of; a data bit written into
// SR1 during row r leaves in row r+1.
//
// chan_en selects which inputs carry data (the document's "selectable
// number of the 12 input channels"); a disabled input, like a whole idle
// frame (enable low when the frame fill starts), sends zeros.
module sdh_tx
  import sdh_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [N_CH-1:0]   chan_en,
  input  logic [N_CH-1:0]   tx_bits,
  output logic              if_ce,       // interface slot: tx_bits is taken
  output logic              if_sof,      // first slot of a frame fill
  output logic              fill_data,   // frame being filled carries data
  output logic [N_LANE-1:0] word,
  output logic              frame_start  // word is the first of a frame
);

  logic [3:0]  row, next_row;
  logic [11:0] col;
  logic        row_load, soh_rd, pay_rd, par_en, frame_last, status_data;
  logic        rom_sel;
  logic [6:0]  rom_idx;
  logic [7:0]  b1;
  logic [N_CH-1:0]   pay_bit, ch_bit;
  logic [N_LANE-1:0] coded;

  tx_controller u_ctrl (
    .clk, .rst_n, .enable, .row, .col, .next_row, .if_ce, .if_sof, .row_load,
    .soh_rd, .pay_rd, .par_en, .frame_last, .fill_data, .status_data,
    .rom_sel, .rom_idx
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    tx_input_fifo u_fifo (
      .clk, .rst_n,
      .wr   (if_ce),
      .din  (tx_bits[c] & chan_en[c] & fill_data),
      .load (row_load),
      .rd   (pay_rd),
      .dout (pay_bit[c])
    );
    soh_generator_1 u_soh1 (
      .clk, .rst_n,
      .load (row_load), .next_row, .b1, .status_data, .soh_rd,
      .pay_bit (pay_bit[c]), .par_en, .frame_last,
      .dout (ch_bit[c])
    );
  end

  scrambler_3b4b u_scr (.clk, .rst_n, .din(ch_bit), .dout(coded));

  soh_generator_2 u_soh2 (
    .clk, .rst_n, .rom_sel, .rom_idx, .din(coded), .dout(word), .b1, .frame_start
  );

endmodule
